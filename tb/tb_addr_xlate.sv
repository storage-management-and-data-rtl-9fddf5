// tb_addr_xlate: self-checking test of the mod-sum address translation.
//
// Checks the worked example of the design (write address 101 after an S-image
// of 313 words: base 300, so S-buffer offset 0 maps to 300 and offset 212 wraps
// to 0), direct loading of the base register, addresses outside the S-buffer
// page passing unchanged, and 2000 random addresses and bases against
// (offset + base) mod 512 computed here.
`timescale 1ns/1ps
module tb_addr_xlate;
  localparam int CPU_AW = 16, BUF_AW = 9, SBUF_PAGE = 1;

  logic clk = 0, rst_n = 0;
  logic load = 0, load_from_end = 0;
  logic [BUF_AW-1:0] base_in = '0, write_addr = '0, base, buf_addr;
  logic [15:0] word_count = '0;
  logic [CPU_AW-1:0] cpu_addr = '0, phys_addr;
  logic sbuf_hit;

  addr_xlate #(.CPU_AW(CPU_AW), .BUF_AW(BUF_AW), .SBUF_PAGE(SBUF_PAGE)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_map(logic [CPU_AW-1:0] a, logic [CPU_AW-1:0] want, bit hit);
    cpu_addr = a;
    #1;
    checks++;
    if (phys_addr !== want || sbuf_hit !== hit) begin
      failures++;
      $display("addr %04x: phys %04x hit %0d, want %04x hit %0d", a, phys_addr, sbuf_hit, want, hit);
    end
  endtask

  initial begin
    int b, o, pg;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // worked example: last word at 100, word count 313 -> base 300
    @(negedge clk);
    write_addr = 9'd101; word_count = 16'd313; load_from_end = 1;
    @(negedge clk);
    load_from_end = 0;
    checks++;
    if (base !== 9'd300) begin failures++; $display("base %0d, want 300", base); end
    expect_map(16'h0200, 16'h0200 | 16'd300, 1);
    expect_map(16'h0200 | 16'd211, 16'h0200 | 16'd511, 1);
    expect_map(16'h0200 | 16'd212, 16'h0200, 1);
    expect_map(16'h1234, 16'h1234, 0);
    expect_map(16'h01FF, 16'h01FF, 0);
    // load has priority over load_from_end
    @(negedge clk);
    base_in = 9'd7; load = 1; load_from_end = 1;
    @(negedge clk);
    load = 0; load_from_end = 0;
    checks++;
    if (base !== 9'd7) begin failures++; $display("base %0d, want 7", base); end
    for (int i = 0; i < 2000; i++) begin
      b  = $urandom_range(511, 0);
      o  = $urandom_range(511, 0);
      pg = ($urandom_range(3, 0) == 0) ? $urandom_range(127, 0) : SBUF_PAGE;
      @(negedge clk);
      base_in = 9'(b); load = 1;
      @(negedge clk);
      load = 0;
      if (pg == SBUF_PAGE)
        expect_map(16'((pg << 9) | o), 16'((pg << 9) | ((o + b) % 512)), 1);
      else
        expect_map(16'((pg << 9) | o), 16'((pg << 9) | o), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
