// tb_s_buffer: self-checking test of the S-buffer and its controller.
//
// Port 0 acts as the receiving shifter (writes at its own pointer), port 1 as
// the sending shifter (reads at its own pointer, flagged as sender), and the
// CPU port makes random reads and writes. A reference model kept here (memory
// contents, write address, last operation) predicts for every answered access
// whether it is refused (full or empty) and what a read returns. Requests are
// random, so the buffer goes full, goes empty, wraps around many times and
// sees both shifters asking in the same cycle. Also checked: one answer per
// clock at most, the one-clock latency of an uncontested access, the CPU being
// served only when no shifter asks, and s_counter against random s_inc/s_dec.
`timescale 1ns/1ps
module tb_s_buffer;
  import lcell_pkg::*;
  localparam int BUF_AW = 9, BSIZE = 512;

  logic clk = 0, rst_n = 0, init = 0;
  logic [BUF_AW-1:0] img_start = '0, img_end = '0;
  logic [1:0] req = '0, done, ok, is_sender = 2'b10, s_inc = '0, s_dec = '0;
  buf_op_e op [2];
  logic [BUF_AW-1:0] addr [2], rd_ptr [2];
  logic [DATA_W-1:0] wdata [2], rdata;
  logic s_gt1;
  logic [7:0] s_count;
  logic cpu_req = 0, cpu_we = 0, cpu_done;
  logic [BUF_AW-1:0] cpu_addr = '0, write_addr, read_base;
  logic [DATA_W-1:0] cpu_wdata = '0, cpu_rdata;
  buf_op_e last_op;
  logic ev_full, ev_empty, ev_conflict;

  s_buffer #(.BUF_AW(BUF_AW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [7:0] mmem [BSIZE];
  bit mvalid [BSIZE];   // contents known (the RAM starts with random data)
  int mwa; buf_op_e mlast;
  int wptr, rptr, mcount;
  int n_full = 0, n_empty = 0, n_conf = 0, n_cpu = 0, n_wr = 0, n_rd = 0;

  assign rd_ptr[0] = BUF_AW'(wptr);
  assign rd_ptr[1] = BUF_AW'(rptr);
  assign op[0] = BUF_WRITE;
  assign op[1] = BUF_READ;
  assign addr[0] = BUF_AW'(wptr);
  assign addr[1] = BUF_AW'(rptr);
  logic [7:0] wd0;
  assign wdata[0] = wd0;
  assign wdata[1] = '0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [7:0] cpu_exp;
    int lat;
    wd0 = '0;
    for (int i = 0; i < BSIZE; i++) begin mmem[i] = '0; mvalid[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // start with an empty buffer whose S-image bounds are both 40
    @(negedge clk);
    img_start = 9'd40; img_end = 9'd40; init = 1;
    @(negedge clk);
    init = 0;
    mwa = 40; mlast = BUF_READ; wptr = 40; rptr = 40; mcount = 0;
    check(s_count == 0, "s_count after init of an empty buffer");
    // directed: uncontested read latency and an empty refusal
    req[1] = 1;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!done[1]);
    check(lat == 1, "read answered one clock after the request");
    check(!ok[1], "read of an empty buffer refused");
    req[1] = 0;
    @(negedge clk);
    // random traffic
    for (int cyc = 0; cyc < 60000; cyc++) begin
      // answers of the previous clock
      check(!(done[0] && done[1]), "at most one answer per clock");
      if (done[0]) begin
        bit exp_ok;
        exp_ok = !(rptr == mwa && mlast == BUF_WRITE);
        check(ok[0] == exp_ok, $sformatf("write ok=%0d want %0d", ok[0], exp_ok));
        if (exp_ok) begin
          mmem[wptr] = wdata[0]; mvalid[wptr] = 1; mwa = (wptr + 1) % BSIZE; mlast = BUF_WRITE;
          wptr = (wptr + 1) % BSIZE; n_wr++;
        end else n_full++;
        req[0] = 0;
      end
      if (done[1]) begin
        bit exp_ok;
        exp_ok = !(rptr == mwa && mlast == BUF_READ);
        check(ok[1] == exp_ok, $sformatf("read ok=%0d want %0d", ok[1], exp_ok));
        if (exp_ok) begin
          check(!mvalid[rptr] || rdata == mmem[rptr], $sformatf("read data %02x want %02x", rdata, mmem[rptr]));
          mlast = BUF_READ; rptr = (rptr + 1) % BSIZE; n_rd++;
        end else n_empty++;
        req[1] = 0;
      end
      if (cpu_done) begin
        if (!cpu_we) begin if (mvalid[cpu_addr]) check(cpu_rdata == cpu_exp, "CPU read data"); end
        else begin mmem[cpu_addr] = cpu_wdata; mvalid[cpu_addr] = 1; end
        cpu_req = 0; n_cpu++;
      end
      // new requests; phases alternate between filling and draining
      if (!req[0] && !done[0] && ($urandom_range(99, 0) < (((cyc / 3000) % 2) ? 80 : 20))) begin
        req[0] = 1; wd0 = 8'($urandom);
      end
      if (!req[1] && !done[1] && ($urandom_range(99, 0) < (((cyc / 3000) % 2) ? 20 : 80)))
        req[1] = 1;
      if (!cpu_req && !cpu_done && $urandom_range(99, 0) < 3) begin
        cpu_req = 1; cpu_we = $urandom_range(1, 0) == 1; cpu_addr = 9'($urandom);
        cpu_wdata = 8'($urandom); cpu_exp = mmem[cpu_addr];
      end
      // s_counter
      s_inc = 2'($urandom_range(3, 0)) & {$urandom_range(9, 0) == 0, $urandom_range(9, 0) == 0};
      s_dec = 2'($urandom_range(3, 0)) & {$urandom_range(9, 0) == 0, $urandom_range(9, 0) == 0};
      if (mcount < 2) s_dec = '0;
      mcount = mcount + int'(s_inc[0]) + int'(s_inc[1]) - int'(s_dec[0]) - int'(s_dec[1]);
      if (req == 2'b11 && !done[0] && !done[1]) n_conf++;
      @(posedge clk);
      check(dut.cpu_gnt == 1'b0 || (dut.eligible == 2'b00), "CPU granted while a shifter asked");
      @(negedge clk);
      s_inc = '0; s_dec = '0;
      check(int'(s_count) == mcount, $sformatf("s_count %0d want %0d", s_count, mcount));
      check(s_gt1 == (mcount > 1), "s_gt1 flag");
    end
    $display("writes=%0d reads=%0d full=%0d empty=%0d contention=%0d cpu=%0d",
             n_wr, n_rd, n_full, n_empty, n_conf, n_cpu);
    check(n_full > 0, "buffer never became full");
    check(n_empty > 0, "buffer never became empty");
    check(n_conf > 0, "shifters never asked in the same clock");
    check(n_wr > 2 * BSIZE, "buffer did not wrap around");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
