// tb_shifter: self-checking test of the shifter controller, for both ports.
//
// Two shifters are tested side by side, one as SL (SIDE_LEFT) and one as SR
// (SIDE_RIGHT); they differ only in the sign of the flow number that makes
// them receive or send. Each has a model S-buffer kept here that answers every
// access one clock later and refuses a random quarter of them (as a full or
// empty buffer would), and link models at random speed. Three runs per port:
//  1. receiving two S-images (20 and 5 words) written from an address near the
//     end of the buffer so that they wrap: the words must land in order, s_inc
//     must pulse twice and the flow must return to zero;
//  2. sending two S-images with s_counter > 1 (pure shifting): both images go
//     out in order, with two s_dec pulses and no cloning;
//  3. sending three S-cells with nothing more to receive and s_counter = 1
//     (cloning): the same image goes out three times.
`timescale 1ns/1ps
module tb_shifter;
  import lcell_pkg::*;
  localparam int BUF_AW = 9, BSIZE = 512, FLOW_W = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int finished = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (finished == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] img_byte(int id, int size, int i);
    if (i == 0) return 8'(size);
    if (i == 1) return 8'(size >> 8);
    return 8'(id * 41 + i * 7 + 3);
  endfunction

  for (genvar g = 0; g < 2; g++) begin : g_side
    localparam side_e SIDE = g ? SIDE_RIGHT : SIDE_LEFT;
    localparam int SGN = g ? -1 : 1;     // sign of a receiving flow

    logic start = 0;
    logic signed [FLOW_W-1:0] flow_init = '0, flow;
    logic [BUF_AW-1:0] img_start = '0, img_end = '0;
    logic fin;
    logic rx_ready = 0, rx_ack, tx_ready, tx_ack = 0;
    logic [7:0] rx_data = '0, tx_data;
    logic buf_req, buf_done = 0, buf_ok = 0;
    buf_op_e buf_op;
    logic [BUF_AW-1:0] buf_addr;
    logic [7:0] buf_wdata, buf_rdata = '0;
    logic is_sender, rx_pending, other_rx_pending = 0, s_gt1 = 0, s_inc, s_dec;
    logic ev_pure, ev_clone, ev_block, ev_starve;

    shifter #(.SIDE(SIDE), .BUF_AW(BUF_AW), .FLOW_W(FLOW_W)) dut (.*);

    // model S-buffer: answers one clock after the request, refuses 1 in 4
    logic [7:0] bmem [BSIZE];
    int n_inc = 0, n_dec = 0, n_pure = 0, n_clone = 0, n_refused = 0;
    always @(posedge clk) if (rst_n) begin
      n_inc   += int'(s_inc);
      n_dec   += int'(s_dec);
      n_pure  += int'(ev_pure);
      n_clone += int'(ev_clone);
      if (buf_done) buf_done <= 1'b0;
      else if (buf_req) begin
        buf_done <= 1'b1;
        if ($urandom_range(3, 0) == 0) begin
          buf_ok <= 1'b0; n_refused++;
        end else begin
          buf_ok <= 1'b1;
          if (buf_op == BUF_WRITE) bmem[buf_addr] <= buf_wdata;
          else buf_rdata <= bmem[buf_addr];
        end
      end
    end

    task automatic chk(bit c, string m);
      checks++;
      if (!c) begin failures++; $display("%s: FAIL %s", SIDE.name(), m); end
    endtask

    task automatic send_img(int id, int size);
      for (int i = 0; i < size; i++) begin
        repeat ($urandom_range(3, 0)) @(posedge clk);
        while (rx_ack) @(posedge clk);
        rx_data = img_byte(id, size, i); rx_ready = 1;
        do @(posedge clk); while (!rx_ack);
        rx_ready = 0;
      end
    endtask

    task automatic recv_img(int id, int size);
      logic [7:0] d;
      for (int i = 0; i < size; i++) begin
        do @(posedge clk); while (!tx_ready);
        repeat ($urandom_range(3, 0)) @(posedge clk);
        d = tx_data; tx_ack = 1;
        do @(posedge clk); while (tx_ready);
        tx_ack = 0;
        chk(d == img_byte(id, size, i), $sformatf("image %0d word %0d: %02x want %02x",
            id, i, d, img_byte(id, size, i)));
      end
    endtask

    task automatic go(int f, int st, int en);
      @(negedge clk);
      flow_init = FLOW_W'(f); img_start = BUF_AW'(st); img_end = BUF_AW'(en); start = 1;
      @(negedge clk);
      start = 0;
    endtask

    initial begin
      int base;
      for (int i = 0; i < BSIZE; i++) bmem[i] = '0;
      wait (rst_n);
      repeat (2) @(posedge clk);
      // 1. receive two images into a buffer whose write pointer starts at 500
      go(SGN * 2, 500, 500);
      chk(rx_pending == 1'b1, "rx_pending while S-cells are to come");
      send_img(1, 20);
      send_img(2, 5);
      wait (fin);
      chk(n_inc == 2, $sformatf("s_inc pulses %0d want 2", n_inc));
      chk(flow == 0, "flow back at zero after receiving");
      chk(!rx_pending, "rx_pending cleared");
      chk(!is_sender, "receiver not flagged as sender");
      for (int i = 0; i < 25; i++)
        chk(bmem[(500 + i) % BSIZE] == (i < 20 ? img_byte(1, 20, i) : img_byte(2, 5, i - 20)),
            $sformatf("received word %0d", i));
      // 2. pure shifting: two images at 100, s_counter > 1
      base = 100;
      for (int i = 0; i < 10; i++) bmem[base + i] = img_byte(3, 10, i);
      for (int i = 0; i < 7; i++)  bmem[base + 10 + i] = img_byte(4, 7, i);
      s_gt1 = 1;
      go(-SGN * 2, base, base + 17);
      chk(is_sender, "sender flagged");
      recv_img(3, 10);
      recv_img(4, 7);
      wait (fin);
      chk(n_dec == 2 && n_pure == 2 && n_clone == 0,
          $sformatf("pure shifting: s_dec %0d pure %0d clone %0d", n_dec, n_pure, n_clone));
      chk(flow == 0, "flow back at zero after sending");
      // 3. cloning: one image at 505 (wraps), s_counter = 1, nothing to receive
      s_gt1 = 0; other_rx_pending = 0;
      for (int i = 0; i < 12; i++) bmem[(505 + i) % BSIZE] = img_byte(5, 12, i);
      go(-SGN * 3, 505, (505 + 12) % BSIZE);
      recv_img(5, 12);
      recv_img(5, 12);
      recv_img(5, 12);
      wait (fin);
      chk(n_clone == 3 && n_dec == 2, $sformatf("cloning: clone %0d s_dec %0d", n_clone, n_dec));
      chk(n_refused > 0, "no refused buffer access was exercised");
      finished++;
    end
  end
endmodule
