// l_array: a linear array of LSIZE L-cells and their data movement hardware.
//
// The right port (SR) of every L-cell is wired to the left port (SL) of its
// right-hand neighbour. The flow numbers are given per connection: flow[k] is
// the signed number of S-cells that cross the connection on the left of cell k
// (positive = moving right), so cell k uses flow[k] as its left flow and
// flow[k+1] as its right flow; flow[0] and flow[LSIZE] are the two ends of the
// array, whose link ports are brought out (in_l_* / out_l_* on the left end,
// in_r_* / out_r_* on the right end) so that S-cells can be fed in or taken out
// there, as by a virtual L-cell beyond the end.
//
// A start pulse begins data movement in all cells at once; done rises when
// every cell has finished and stays high until the next start. Each cell's CPU
// port (the cell's memory access path during the computation phases) and its
// S-image bounds are brought out as arrays indexed by cell.
//
// LSIZE = 16 and the 512-word, 8-bit S-buffer follow the source design's
// examples; the per-connection flow input and the end ports are this design's
// way of presenting the array.
module l_array
  import lcell_pkg::*;
#(
  parameter int unsigned LSIZE     = 16,
  parameter int unsigned BUF_AW    = 9,
  parameter int unsigned FLOW_W    = 16,
  parameter int unsigned CPU_AW    = 16,
  parameter int unsigned SBUF_PAGE = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [FLOW_W-1:0] flow        [LSIZE+1],
  input  logic [BUF_AW-1:0]        img_start   [LSIZE],
  input  logic [BUF_AW-1:0]        img_end     [LSIZE],
  output logic                     done,
  output logic [LSIZE-1:0]         cell_done,
  output logic [BUF_AW-1:0]        final_start [LSIZE],
  output logic [BUF_AW-1:0]        final_end   [LSIZE],
  // left end: words entering cell 0 (moving right), words leaving it (moving left)
  input  logic                     in_l_ready,
  input  logic [DATA_W-1:0]        in_l_data,
  output logic                     in_l_ack,
  output logic                     out_l_ready,
  output logic [DATA_W-1:0]        out_l_data,
  input  logic                     out_l_ack,
  // right end: words leaving cell LSIZE-1 (moving right), words entering it (moving left)
  output logic                     out_r_ready,
  output logic [DATA_W-1:0]        out_r_data,
  input  logic                     out_r_ack,
  input  logic                     in_r_ready,
  input  logic [DATA_W-1:0]        in_r_data,
  output logic                     in_r_ack,
  // per-cell CPU ports
  input  logic [LSIZE-1:0]         cpu_req,
  input  logic [LSIZE-1:0]         cpu_we,
  input  logic [CPU_AW-1:0]        cpu_addr       [LSIZE],
  input  logic [DATA_W-1:0]        cpu_wdata      [LSIZE],
  output logic [LSIZE-1:0]         cpu_done,
  output logic [DATA_W-1:0]        cpu_rdata      [LSIZE],
  input  logic [LSIZE-1:0]         cpu_base_we,
  input  logic [BUF_AW-1:0]        cpu_base_wdata [LSIZE]
);

  // Connection k sits on the left of cell k (k = 0 .. LSIZE).
  logic              rw_ready [LSIZE+1];   // rightward words
  logic [DATA_W-1:0] rw_data  [LSIZE+1];
  logic              rw_ack   [LSIZE+1];
  logic              lw_ready [LSIZE+1];   // leftward words
  logic [DATA_W-1:0] lw_data  [LSIZE+1];
  logic              lw_ack   [LSIZE+1];
  logic [LSIZE-1:0]  busy;
  logic              running;

  assign rw_ready[0]     = in_l_ready;
  assign rw_data[0]      = in_l_data;
  assign in_l_ack        = rw_ack[0];
  assign out_l_ready     = lw_ready[0];
  assign out_l_data      = lw_data[0];
  assign lw_ack[0]       = out_l_ack;
  assign out_r_ready     = rw_ready[LSIZE];
  assign out_r_data      = rw_data[LSIZE];
  assign rw_ack[LSIZE]   = out_r_ack;
  assign lw_ready[LSIZE] = in_r_ready;
  assign lw_data[LSIZE]  = in_r_data;
  assign in_r_ack        = lw_ack[LSIZE];

  for (genvar k = 0; k < LSIZE; k++) begin : g_cell
    logic cell_fin_pulse;
    lcell_io #(.BUF_AW(BUF_AW), .FLOW_W(FLOW_W), .CPU_AW(CPU_AW), .SBUF_PAGE(SBUF_PAGE)) u_cell (
      .clk, .rst_n, .start,
      .left_flow_in(flow[k]), .right_flow_in(flow[k+1]),
      .img_start(img_start[k]), .img_end(img_end[k]),
      .busy(busy[k]), .done(cell_fin_pulse),
      .final_start(final_start[k]), .final_end(final_end[k]),
      .left_flow(), .right_flow(),
      .l_rx_ready(rw_ready[k]),   .l_rx_data(rw_data[k]),   .l_rx_ack(rw_ack[k]),
      .l_tx_ready(lw_ready[k]),   .l_tx_data(lw_data[k]),   .l_tx_ack(lw_ack[k]),
      .r_tx_ready(rw_ready[k+1]), .r_tx_data(rw_data[k+1]), .r_tx_ack(rw_ack[k+1]),
      .r_rx_ready(lw_ready[k+1]), .r_rx_data(lw_data[k+1]), .r_rx_ack(lw_ack[k+1]),
      .cpu_req(cpu_req[k]), .cpu_we(cpu_we[k]), .cpu_addr(cpu_addr[k]),
      .cpu_wdata(cpu_wdata[k]), .cpu_done(cpu_done[k]), .cpu_rdata(cpu_rdata[k]),
      .cpu_base_we(cpu_base_we[k]), .cpu_base_wdata(cpu_base_wdata[k])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)              cell_done[k] <= 1'b0;
      else if (start)          cell_done[k] <= 1'b0;
      else if (cell_fin_pulse) cell_done[k] <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     running <= 1'b0;
    else if (start) running <= 1'b1;
  end
  assign done = running && !start && &cell_done;

endmodule
