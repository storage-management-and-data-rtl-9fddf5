// tb_lcell_io: self-checking test of one L-cell's data movement hardware.
//
// Link models stand in for the two neighbouring L-cells. Four data movement
// runs, each preloaded through the CPU port and checked afterwards through the
// CPU port with the translation base the cell loads itself:
//  A. pure shifting to the right: the cell holds X (wrapping around the end of
//     the buffer), receives Y from the left and sends X to the right; it ends
//     holding Y;
//  B. bidirectional cloning: the cell holds M and its flows are -2 and +3; two
//     copies leave to the left, three to the right, M stays;
//  C. an empty cell receives a clonable S-cell from the right and sends two
//     copies to the left;
//  D. pure shifting to the left through a cell: holds Z, receives W1 and W2
//     from the right, sends Z then W1 to the left, keeps W2;
//  E. throughput: the cell sends its 100-word S-cell to a right neighbour that
//     acknowledges at once, and keeps a copy. With nothing blocking and the
//     buffer read overlapped with the handshake, a sender moves a word every
//     three clocks, so start to finish may take at most 3 clocks per word plus
//     a fixed overhead of 12 clocks.
// Also checked: done pulses once per run, the flow registers end at zero, and a
// CPU access outside the S-buffer page is answered with zero data.
`timescale 1ns/1ps
module tb_lcell_io;
  import lcell_pkg::*;
  localparam int BUF_AW = 9, BSIZE = 512, FLOW_W = 16, CPU_AW = 16;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [FLOW_W-1:0] left_flow_in = '0, right_flow_in = '0, left_flow, right_flow;
  logic [BUF_AW-1:0] img_start = '0, img_end = '0, final_start, final_end;
  logic busy, done;
  logic l_rx_ready = 0, l_rx_ack, l_tx_ready, l_tx_ack = 0;
  logic [7:0] l_rx_data = '0, l_tx_data;
  logic r_tx_ready, r_tx_ack = 0, r_rx_ready = 0, r_rx_ack;
  logic [7:0] r_tx_data, r_rx_data = '0;
  logic cpu_req = 0, cpu_we = 0, cpu_done, cpu_base_we = 0;
  logic [CPU_AW-1:0] cpu_addr = '0;
  logic [7:0] cpu_wdata = '0, cpu_rdata;
  logic [BUF_AW-1:0] cpu_base_wdata = '0;

  lcell_io dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_done = 0;
  always @(posedge clk) if (rst_n) n_done += int'(done);
  longint cyc = 0;
  always @(posedge clk) cyc++;
  bit fast = 0;                 // neighbour models answer without delay

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic logic [7:0] img_byte(int id, int size, int i);
    if (i == 0) return 8'(size);
    if (i == 1) return 8'(size >> 8);
    return 8'(id * 53 + i * 11 + 1);
  endfunction

  task automatic cpu(bit we, int a, logic [7:0] wd, output logic [7:0] rd);
    @(negedge clk);
    cpu_addr = CPU_AW'(a); cpu_we = we; cpu_wdata = wd; cpu_req = 1;
    do @(posedge clk); while (!cpu_done);
    rd = cpu_rdata;
    @(negedge clk);
    cpu_req = 0;
  endtask

  task automatic preload(int id, int size, int st);
    logic [7:0] rd;
    @(negedge clk);
    cpu_base_wdata = '0; cpu_base_we = 1;
    @(negedge clk);
    cpu_base_we = 0;
    for (int i = 0; i < size; i++) cpu(1, 16'h0200 | ((st + i) % BSIZE), img_byte(id, size, i), rd);
  endtask

  task automatic check_final(int id, int size);
    logic [7:0] rd;
    chk(int'((final_end - final_start) % BSIZE) == size,
        $sformatf("cell holds %0d words, want %0d", int'((final_end - final_start) % BSIZE), size));
    for (int i = 0; i < size; i++) begin
      cpu(0, 16'h0200 | i, 8'h00, rd);
      chk(rd == img_byte(id, size, i), $sformatf("final word %0d: %02x want %02x", i, rd, img_byte(id, size, i)));
    end
    chk(left_flow == 0 && right_flow == 0, "flow registers at zero");
  endtask

  // neighbour models
  task automatic feed(bit from_right, int id, int size);
    for (int i = 0; i < size; i++) begin
      repeat (fast ? 0 : $urandom_range(2, 0)) @(posedge clk);
      if (!from_right) begin
        while (l_rx_ack) @(posedge clk);
        l_rx_data = img_byte(id, size, i); l_rx_ready = 1;
        do @(posedge clk); while (!l_rx_ack);
        l_rx_ready = 0;
      end else begin
        while (r_rx_ack) @(posedge clk);
        r_rx_data = img_byte(id, size, i); r_rx_ready = 1;
        do @(posedge clk); while (!r_rx_ack);
        r_rx_ready = 0;
      end
    end
  endtask

  task automatic take(bit at_right, int id, int size);
    logic [7:0] d;
    for (int i = 0; i < size; i++) begin
      if (at_right) begin
        do @(posedge clk); while (!r_tx_ready);
        repeat (fast ? 0 : $urandom_range(2, 0)) @(posedge clk);
        d = r_tx_data; r_tx_ack = 1;
        do @(posedge clk); while (r_tx_ready);
        r_tx_ack = 0;
      end else begin
        do @(posedge clk); while (!l_tx_ready);
        repeat (fast ? 0 : $urandom_range(2, 0)) @(posedge clk);
        d = l_tx_data; l_tx_ack = 1;
        do @(posedge clk); while (l_tx_ready);
        l_tx_ack = 0;
      end
      chk(d == img_byte(id, size, i), $sformatf("%s out image %0d word %0d: %02x want %02x",
          at_right ? "right" : "left", id, i, d, img_byte(id, size, i)));
    end
  endtask

  task automatic go(int lf, int rf, int st, int en);
    @(negedge clk);
    left_flow_in = FLOW_W'(lf); right_flow_in = FLOW_W'(rf);
    img_start = BUF_AW'(st); img_end = BUF_AW'(en); start = 1;
    @(negedge clk);
    start = 0;
    chk(busy, "busy after start");
  endtask

  initial begin
    logic [7:0] rd;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // A
    preload(1, 30, 480);
    go(1, 1, 480, (480 + 30) % BSIZE);
    fork feed(0, 2, 40); take(1, 1, 30); join
    wait (!busy);
    check_final(2, 40);
    // B
    preload(3, 15, 10);
    go(-2, 3, 10, 25);
    fork take(0, 3, 15); take(1, 3, 15); join
    fork take(0, 3, 15); take(1, 3, 15); join
    take(1, 3, 15);
    wait (!busy);
    check_final(3, 15);
    // C
    go(-2, -1, 200, 200);
    fork feed(1, 4, 9); take(0, 4, 9); join
    take(0, 4, 9);
    wait (!busy);
    check_final(4, 9);
    // D
    preload(5, 6, 300);
    go(-2, -2, 300, 306);
    fork
      begin feed(1, 6, 25); feed(1, 7, 8); end
      begin take(0, 5, 6); take(0, 6, 25); end
    join
    wait (!busy);
    check_final(7, 8);
    // E
    begin
      longint t0;
      preload(8, 100, 50);
      fast = 1;
      go(0, 1, 50, 150);
      t0 = cyc;
      take(1, 8, 100);
      while (busy) @(posedge clk);
      fast = 0;
      chk(cyc - t0 <= 3 * 100 + 12, $sformatf("100 words took %0d clocks, want at most %0d",
          cyc - t0, 3 * 100 + 12));
      $display("unblocked transfer: 100 words in %0d clocks", cyc - t0);
      check_final(8, 100);
    end
    chk(n_done == 5, $sformatf("done pulsed %0d times, want 5", n_done));
    // outside the S-buffer page
    cpu(0, 16'h4000, 8'h00, rd);
    chk(rd == 8'h00, "access outside the S-buffer page");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
