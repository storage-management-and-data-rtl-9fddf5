// lcell_io: the memory management I/O system of one L-cell.
//
// Three cooperating controllers move S-cells during the data movement phase:
// the left shifter (SL), the right shifter (SR) and the S-buffer controller.
// The flow numbers live in the shifters, s_counter lives in the S-buffer, and
// only flags derived from them cross between the three: "left side still has
// S-cells to receive" (left flow > 0), "right side still has S-cells to
// receive" (right flow < 0) and (s_counter > 1).
//
// Operation: before data movement the CPU sets the left and right flow numbers
// and the bounds of the S-image in the S-buffer (img_start = first word,
// img_end = one past the last word; equal bounds mean an empty cell). A start
// pulse loads them into the shifters and the S-buffer; both shifters then run
// concurrently. When both have finished, done pulses for one clock, final_start
// and final_end give the bounds of the S-cell now held, and the address
// translation base is loaded with final_start so that the CPU sees the S-image
// from offset 0 of its S-buffer page.
//
// CPU port: a request with cpu_req held until cpu_done. An address inside the
// S-buffer page is translated and served by the S-buffer at the lowest
// priority; any other address is answered at once with zero data (the rest of
// the cell's memory is outside this block). cpu_base_we sets the translation
// base directly, e.g. to 0 to preload raw buffer contents.
//
// The structure (three controllers, state kept in counters with flags between
// them) follows the source design; the separate wires per link direction, the
// arbitration and the CPU port details are this design's choices.
module lcell_io
  import lcell_pkg::*;
#(
  parameter int unsigned BUF_AW    = 9,
  parameter int unsigned FLOW_W    = 16,
  parameter int unsigned CPU_AW    = 16,
  parameter int unsigned SBUF_PAGE = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // data movement control
  input  logic                     start,
  input  logic signed [FLOW_W-1:0] left_flow_in,
  input  logic signed [FLOW_W-1:0] right_flow_in,
  input  logic [BUF_AW-1:0]        img_start,
  input  logic [BUF_AW-1:0]        img_end,
  output logic                     busy,
  output logic                     done,
  output logic [BUF_AW-1:0]        final_start,
  output logic [BUF_AW-1:0]        final_end,
  output logic signed [FLOW_W-1:0] left_flow,
  output logic signed [FLOW_W-1:0] right_flow,
  // left port (SL): rightward words come in, leftward words go out
  input  logic                     l_rx_ready,
  input  logic [DATA_W-1:0]        l_rx_data,
  output logic                     l_rx_ack,
  output logic                     l_tx_ready,
  output logic [DATA_W-1:0]        l_tx_data,
  input  logic                     l_tx_ack,
  // right port (SR): rightward words go out, leftward words come in
  output logic                     r_tx_ready,
  output logic [DATA_W-1:0]        r_tx_data,
  input  logic                     r_tx_ack,
  input  logic                     r_rx_ready,
  input  logic [DATA_W-1:0]        r_rx_data,
  output logic                     r_rx_ack,
  // CPU port
  input  logic                     cpu_req,
  input  logic                     cpu_we,
  input  logic [CPU_AW-1:0]        cpu_addr,
  input  logic [DATA_W-1:0]        cpu_wdata,
  output logic                     cpu_done,
  output logic [DATA_W-1:0]        cpu_rdata,
  input  logic                     cpu_base_we,
  input  logic [BUF_AW-1:0]        cpu_base_wdata
);

  logic [1:0]          b_req, b_done, b_ok, is_sender, s_inc, s_dec, fin, rx_pend;
  buf_op_e             b_op    [2];
  logic [BUF_AW-1:0]   b_addr  [2];
  logic [DATA_W-1:0]   b_wdata [2];
  logic [DATA_W-1:0]   b_rdata;
  logic                s_gt1;
  logic [7:0]          s_count;
  logic [BUF_AW-1:0]   write_addr, read_base;
  buf_op_e             last_op;
  logic                ev_full, ev_empty, ev_conflict;
  logic [1:0]          ev_pure, ev_clone, ev_block, ev_starve;

  logic                running;
  logic                sb_hit, sb_req, sb_done, miss_done;
  logic [BUF_AW-1:0]   sb_addr, xl_base;
  logic [CPU_AW-1:0]   phys_addr;
  logic [DATA_W-1:0]   sb_rdata;

  // ---- left shifter (SL) -------------------------------------------------------
  shifter #(.SIDE(SIDE_LEFT), .BUF_AW(BUF_AW), .FLOW_W(FLOW_W)) u_sl (
    .clk, .rst_n, .start,
    .flow_init(left_flow_in), .img_start, .img_end,
    .flow(left_flow), .fin(fin[0]),
    .rx_ready(l_rx_ready), .rx_data(l_rx_data), .rx_ack(l_rx_ack),
    .tx_ready(l_tx_ready), .tx_data(l_tx_data), .tx_ack(l_tx_ack),
    .buf_req(b_req[0]), .buf_op(b_op[0]), .buf_addr(b_addr[0]), .buf_wdata(b_wdata[0]),
    .buf_done(b_done[0]), .buf_ok(b_ok[0]), .buf_rdata(b_rdata),
    .is_sender(is_sender[0]), .rx_pending(rx_pend[0]), .other_rx_pending(rx_pend[1]),
    .s_gt1, .s_inc(s_inc[0]), .s_dec(s_dec[0]),
    .ev_pure(ev_pure[0]), .ev_clone(ev_clone[0]), .ev_block(ev_block[0]),
    .ev_starve(ev_starve[0])
  );

  // ---- right shifter (SR) ------------------------------------------------------
  shifter #(.SIDE(SIDE_RIGHT), .BUF_AW(BUF_AW), .FLOW_W(FLOW_W)) u_sr (
    .clk, .rst_n, .start,
    .flow_init(right_flow_in), .img_start, .img_end,
    .flow(right_flow), .fin(fin[1]),
    .rx_ready(r_rx_ready), .rx_data(r_rx_data), .rx_ack(r_rx_ack),
    .tx_ready(r_tx_ready), .tx_data(r_tx_data), .tx_ack(r_tx_ack),
    .buf_req(b_req[1]), .buf_op(b_op[1]), .buf_addr(b_addr[1]), .buf_wdata(b_wdata[1]),
    .buf_done(b_done[1]), .buf_ok(b_ok[1]), .buf_rdata(b_rdata),
    .is_sender(is_sender[1]), .rx_pending(rx_pend[1]), .other_rx_pending(rx_pend[0]),
    .s_gt1, .s_inc(s_inc[1]), .s_dec(s_dec[1]),
    .ev_pure(ev_pure[1]), .ev_clone(ev_clone[1]), .ev_block(ev_block[1]),
    .ev_starve(ev_starve[1])
  );

  // ---- S-buffer and buffer controller ---------------------------------------------
  s_buffer #(.BUF_AW(BUF_AW), .SC_W(8)) u_buf (
    .clk, .rst_n,
    .init(start), .img_start, .img_end,
    .req(b_req), .op(b_op), .addr(b_addr), .wdata(b_wdata),
    .done(b_done), .ok(b_ok), .rdata(b_rdata),
    .is_sender, .rd_ptr(b_addr),
    .s_inc, .s_dec, .s_gt1, .s_count,
    .cpu_req(sb_req), .cpu_we, .cpu_addr(sb_addr), .cpu_wdata,
    .cpu_done(sb_done), .cpu_rdata(sb_rdata),
    .write_addr, .read_base, .last_op,
    .ev_full, .ev_empty, .ev_conflict
  );

  // ---- sequencing of the data movement phase ----------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start)
        running <= 1'b1;
      else if (running && &fin) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end
  assign busy = running;

  // Bounds of the S-cell held: a sending shifter's address counter points at
  // it; with no sender the S-image was never moved away from img_start.
  always_comb begin
    if (is_sender[0])      final_start = b_addr[0];
    else if (is_sender[1]) final_start = b_addr[1];
    else                   final_start = read_base;
  end
  assign final_end = write_addr;

  // ---- CPU side: address translation -------------------------------------------------
  addr_xlate #(.CPU_AW(CPU_AW), .BUF_AW(BUF_AW), .SBUF_PAGE(SBUF_PAGE)) u_xlate (
    .clk, .rst_n,
    .load(cpu_base_we || (running && &fin)),
    .base_in(cpu_base_we ? cpu_base_wdata : final_start),
    .load_from_end(1'b0), .write_addr, .word_count('0),
    .base(xl_base),
    .cpu_addr, .sbuf_hit(sb_hit), .buf_addr(sb_addr), .phys_addr
  );

  assign sb_req = cpu_req && sb_hit;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) miss_done <= 1'b0;
    else        miss_done <= cpu_req && !sb_hit && !miss_done;
  end
  assign cpu_done  = sb_done || miss_done;
  assign cpu_rdata = sb_done ? sb_rdata : '0;

endmodule
