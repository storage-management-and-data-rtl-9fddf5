// addr_xlate: mod-sum address translation for CPU accesses to the S-buffer.
//
// After data movement an S-image may start anywhere in the circular S-buffer.
// Rather than moving it to the start of the buffer, every CPU address that
// falls in the S-buffer page is offset by the image's start: the low BUF_AW
// bits of the CPU address are added to the base register, the carry out of the
// sum is dropped, and the BUF_AW-bit result addresses the buffer. Addresses
// outside the S-buffer page pass unchanged. This needs a buffer of 2**BUF_AW
// words aligned to its own size, as in the source design.
//
// The base register holds the start offset of the S-image. It is loaded with
// base_in when load is high; with load_from_end high instead it is computed as
// (write_address - word_count) mod 2**BUF_AW, as in the source design's worked
// example (write address 101, word count 313: base 300). The 16-bit CPU address
// and the S-buffer's page number SBUF_PAGE are this design's choices.
//
// Timing: the base register updates on the clock edge; the translation itself
// is combinational.
module addr_xlate #(
  parameter int unsigned CPU_AW    = 16,
  parameter int unsigned BUF_AW    = 9,
  parameter int unsigned SBUF_PAGE = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [BUF_AW-1:0] base_in,
  input  logic              load_from_end,
  input  logic [BUF_AW-1:0] write_addr,
  input  logic [15:0]       word_count,
  output logic [BUF_AW-1:0] base,
  input  logic [CPU_AW-1:0] cpu_addr,
  output logic              sbuf_hit,
  output logic [BUF_AW-1:0] buf_addr,
  output logic [CPU_AW-1:0] phys_addr
);

  logic [BUF_AW:0] sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             base <= '0;
    else if (load)          base <= base_in;
    else if (load_from_end) base <= write_addr - word_count[BUF_AW-1:0];
  end

  assign sbuf_hit  = (cpu_addr[CPU_AW-1:BUF_AW] == (CPU_AW-BUF_AW)'(SBUF_PAGE));
  // BUF_AW+1 bit sum; its top bit is discarded.
  assign sum       = {1'b0, cpu_addr[BUF_AW-1:0]} + {1'b0, base};
  assign buf_addr  = sum[BUF_AW-1:0];
  assign phys_addr = sbuf_hit ? {cpu_addr[CPU_AW-1:BUF_AW], buf_addr} : cpu_addr;

endmodule
