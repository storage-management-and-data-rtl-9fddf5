// s_buffer: the S-buffer of one L-cell and its buffer controller.
//
// The S-buffer is a circular buffer of 2**BUF_AW words held in a single-ported
// RAM. Two shifter controllers (port 0 = left shifter SL, port 1 = right
// shifter SR) and the cell's CPU share it. Every access is atomic: a write
// stores a word at the writer's address and sets write_address to the next
// location; a read returns the word at the reader's address. Each shifter
// keeps its own address counter and advances it itself after a successful
// access, as in the source design, where the buffer only keeps write_address
// and last_op.
//
// Over- and under-run protection follows the source design's rule:
//   read_address == write_address && last_op == READ  -> buffer empty
//   read_address == write_address && last_op == WRITE -> buffer full
// A read at an empty buffer and a write at a full one are refused (ok=0) and
// the shifter retries. For the full test the read address is the one of the
// shifter that is sending; when neither sends it is the S-image start given at
// init. Only one shifter can receive, and two shifters send at once only
// during bidirectional cloning, when nothing is received.
//
// The buffer also holds s_counter, the number of S-cells (whole or partly
// received) in the buffer. Each shifter pulses s_inc when it starts receiving
// an S-cell and s_dec when it has sent one away for good; both may arrive in
// the same cycle. The source design requires the counter update to be
// indivisible from the flow test that triggers it; here both happen in one
// clock edge, so that holds by construction. s_gt1 is the (s_counter > 1) flag the
// shifters use to decide between pure shifting and cloning.
//
// Arbitration (this design's choice for the source design's first-come-first-
// served queue): one access per clock. Shifter requests beat the CPU (the
// source design shares a cell's memory between its CPU and its I/O devices by
// priority);
// when both shifters ask in the same cycle the one not served last goes first.
// A requester keeps req high until it sees done; done, ok and rdata are valid
// in the clock after the grant, and a port is not granted again in its done
// cycle. The CPU port does not touch write_address or last_op.
module s_buffer
  import lcell_pkg::*;
#(
  parameter int unsigned BUF_AW = 9,
  parameter int unsigned SC_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // start of data movement: load pointers from the S-image bounds
  input  logic              init,
  input  logic [BUF_AW-1:0] img_start,
  input  logic [BUF_AW-1:0] img_end,
  // shifter ports (index 0 = left, 1 = right)
  input  logic [1:0]             req,
  input  buf_op_e                op    [2],
  input  logic [BUF_AW-1:0]      addr  [2],
  input  logic [DATA_W-1:0]      wdata [2],
  output logic [1:0]             done,
  output logic [1:0]             ok,
  output logic [DATA_W-1:0]      rdata,
  // sender state of each shifter, for the full test
  input  logic [1:0]             is_sender,
  input  logic [BUF_AW-1:0]      rd_ptr [2],
  // s_counter maintenance
  input  logic [1:0]             s_inc,
  input  logic [1:0]             s_dec,
  output logic                   s_gt1,
  output logic [SC_W-1:0]        s_count,
  // CPU port (lowest priority)
  input  logic                   cpu_req,
  input  logic                   cpu_we,
  input  logic [BUF_AW-1:0]      cpu_addr,
  input  logic [DATA_W-1:0]      cpu_wdata,
  output logic                   cpu_done,
  output logic [DATA_W-1:0]      cpu_rdata,
  // buffer state: write_address, the S-image start given at init, last_op
  output logic [BUF_AW-1:0]      write_addr,
  output logic [BUF_AW-1:0]      read_base,
  output buf_op_e                last_op,
  // event strobes (one clock each) for monitoring
  output logic                   ev_full,
  output logic                   ev_empty,
  output logic                   ev_conflict
);

  logic [DATA_W-1:0] mem [2**BUF_AW];

  logic              last_grant;
  logic [1:0]        eligible;
  logic              gnt_valid, gnt_port;
  logic              cpu_gnt;
  logic [BUF_AW-1:0] rd_ref;
  logic              acc_ok;
  logic [DATA_W-1:0] rdata_q;

  // ---- arbitration -------------------------------------------------------
  always_comb begin
    eligible  = req & ~done;
    gnt_valid = |eligible;
    if (&eligible) gnt_port = ~last_grant;
    else           gnt_port = eligible[1];
    cpu_gnt   = !gnt_valid && cpu_req && !cpu_done;
  end

  // ---- full / empty test for the granted access ---------------------------
  always_comb begin
    if (is_sender[0])      rd_ref = rd_ptr[0];
    else if (is_sender[1]) rd_ref = rd_ptr[1];
    else                   rd_ref = read_base;
    if (op[gnt_port] == BUF_WRITE)
      acc_ok = !(rd_ref == write_addr && last_op == BUF_WRITE);
    else
      acc_ok = !(addr[gnt_port] == write_addr && last_op == BUF_READ);
  end

  // ---- RAM ----------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (gnt_valid && acc_ok && op[gnt_port] == BUF_WRITE)
      mem[addr[gnt_port]] <= wdata[gnt_port];
    else if (cpu_gnt && cpu_we)
      mem[cpu_addr] <= cpu_wdata;
  end

  always_ff @(posedge clk) begin
    if (cpu_gnt) rdata_q <= mem[cpu_addr];
    else         rdata_q <= mem[addr[gnt_port]];
  end
  assign rdata     = rdata_q;
  assign cpu_rdata = rdata_q;

  // ---- controller state -----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      write_addr <= '0;
      read_base  <= '0;
      last_op    <= BUF_READ;
      last_grant <= 1'b1;
      done       <= '0;
      ok         <= '0;
      cpu_done   <= 1'b0;
    end else begin
      done     <= '0;
      ok       <= '0;
      cpu_done <= cpu_gnt;
      if (init) begin
        write_addr <= img_end;
        read_base  <= img_start;
        last_op    <= BUF_READ;
      end else if (gnt_valid) begin
        last_grant         <= gnt_port;
        done[gnt_port]     <= 1'b1;
        ok[gnt_port]       <= acc_ok;
        if (acc_ok) begin
          last_op <= op[gnt_port];
          if (op[gnt_port] == BUF_WRITE)
            write_addr <= addr[gnt_port] + 1'b1;
        end
      end
    end
  end

  // ---- s_counter --------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      s_count <= '0;
    else if (init)
      s_count <= (img_start == img_end) ? SC_W'(0) : SC_W'(1);
    else
      s_count <= s_count + SC_W'(s_inc[0]) + SC_W'(s_inc[1])
                         - SC_W'(s_dec[0]) - SC_W'(s_dec[1]);
  end
  assign s_gt1 = s_count > SC_W'(1);

  // ---- monitoring strobes -------------------------------------------------------
  assign ev_full     = gnt_valid && !acc_ok && op[gnt_port] == BUF_WRITE;
  assign ev_empty    = gnt_valid && !acc_ok && op[gnt_port] == BUF_READ;
  assign ev_conflict = &eligible;

  // A port is never granted while its previous access is being answered.
  a_no_regrant: assert property (@(posedge clk) disable iff (!rst_n)
    gnt_valid |-> !done[gnt_port]);

endmodule
