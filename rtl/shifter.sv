// shifter: shifter controller of one L-cell port (SL when SIDE = SIDE_LEFT,
// SR when SIDE = SIDE_RIGHT).
//
// During data movement the shifter is driven only by its flow number, the
// count of S-cells that cross its inter-cell connection (positive = moving
// right). For SL a positive flow makes it a receiver and a negative one a
// sender; SR is the mirror image. Each S-cell started moves the flow one step
// toward zero, so every flow register is zero when data movement is over.
//
// Receiver: for each S-cell it pulses s_inc (together with the flow step), then
// takes words from the link. A word is written into the S-buffer at the
// shifter's address counter before it is acknowledged; a write refused because
// the buffer is full is retried, which holds the link (blockage). The first two
// words are the S-image header, the total word count including the header,
// low byte first; after that many words the S-cell is complete.
//
// Sender: for each S-cell it reads the S-image word by word from its address
// counter (retrying while the buffer is empty) and hands each word to the link.
// When the whole image is out it decides, as the source design does:
//   other side still has S-cells to receive, or s_counter > 1  -> pure shift:
//       clone_addr := address (the next S-cell), pulse s_dec
//   otherwise -> cloning: address := clone_addr, so the same S-image is sent
//       again for the next S-cell this port still has to send.
//
// Link: the source design's send/acknowledge handshake, four phases per word.
// Sender: wait !ack, raise ready with the data; wait ack, drop ready. Receiver:
// wait ready, store the word, raise ack; wait !ready, drop ack. The source
// design's connection is one bidirectional set of ready/ack/data wires; here
// each direction has its own wires (tx_* and rx_*), and a shifter drives only
// those of its role. All signals are synchronous to clk.
//
// Timing: start is a one-clock pulse that loads the flow and the S-image
// bounds; fin is high from the end of the shifter's work until the next start.
// A receiver requests the buffer write in the clock it sees ready, and a sender
// raises ready in the clock its buffer read returns, so an unblocked,
// uncontested link between two cells moves one word every five clocks (three
// when the far side acknowledges in the clock it sees ready). The sender's buffer
// read of the next word overlaps the release phase of the handshake, so the
// rate is set by the handshake itself, whose acknowledge waits for the
// receiver's buffer write (the source design asks for shifting at the full
// link rate when nothing blocks).
module shifter
  import lcell_pkg::*;
#(
  parameter side_e       SIDE   = SIDE_LEFT,
  parameter int unsigned BUF_AW = 9,
  parameter int unsigned FLOW_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [FLOW_W-1:0] flow_init,
  input  logic [BUF_AW-1:0]        img_start,
  input  logic [BUF_AW-1:0]        img_end,
  output logic signed [FLOW_W-1:0] flow,
  output logic                     fin,
  // receiving link (words come in)
  input  logic                     rx_ready,
  input  logic [DATA_W-1:0]        rx_data,
  output logic                     rx_ack,
  // sending link (words go out)
  output logic                     tx_ready,
  output logic [DATA_W-1:0]        tx_data,
  input  logic                     tx_ack,
  // S-buffer access
  output logic                     buf_req,
  output buf_op_e                  buf_op,
  output logic [BUF_AW-1:0]        buf_addr,
  output logic [DATA_W-1:0]        buf_wdata,
  input  logic                     buf_done,
  input  logic                     buf_ok,
  input  logic [DATA_W-1:0]        buf_rdata,
  // state shared with the S-buffer and the other shifter
  output logic                     is_sender,
  output logic                     rx_pending,
  input  logic                     other_rx_pending,
  input  logic                     s_gt1,
  output logic                     s_inc,
  output logic                     s_dec,
  // event strobes for monitoring
  output logic                     ev_pure,
  output logic                     ev_clone,
  output logic                     ev_block,
  output logic                     ev_starve
);

  typedef enum logic [2:0] {
    ST_IDLE, ST_LOOP, ST_RX_WAIT, ST_RX_ACK,
    ST_TX_RD, ST_TX_HS, ST_TX_ACK
  } state_e;

  state_e            state;
  logic [BUF_AW-1:0] addr, clone_addr;
  logic [WC_W-1:0]   word_count, idx;
  logic              role_tx;

  logic inward, outward;
  logic signed [FLOW_W-1:0] flow_step;
  logic [WC_W-1:0] wc_eff, idx_nx;
  logic [WC_W-1:0] wc_nx;
  logic            last_word;

  // Inward flow: S-cells come in through this port.
  assign inward  = (SIDE == SIDE_LEFT) ? (flow > 0) : (flow < 0);
  assign outward = (SIDE == SIDE_LEFT) ? (flow < 0) : (flow > 0);
  assign flow_step = (flow > 0) ? flow - 1'b1 : flow + 1'b1;
  assign rx_pending = inward;

  // Header capture: word 0 is the low byte of the count, word 1 the high byte.
  always_comb begin
    wc_nx = word_count;
    if (idx == 0) wc_nx[7:0]  = (buf_op == BUF_WRITE) ? rx_data : buf_rdata;
    if (idx == 1) wc_nx[15:8] = (buf_op == BUF_WRITE) ? rx_data : buf_rdata;
  end
  assign idx_nx   = idx + 1'b1;
  // An image is never shorter than its header.
  assign wc_eff   = (word_count < WC_W'(HDR_BYTES)) ? WC_W'(HDR_BYTES) : word_count;
  assign last_word = (idx >= WC_W'(HDR_BYTES)) && (idx == wc_eff);

  // Buffer request
  assign buf_req   = (state == ST_RX_WAIT && rx_ready) || (state == ST_TX_RD);
  assign buf_op    = (state == ST_RX_WAIT) ? BUF_WRITE : BUF_READ;
  assign buf_addr  = addr;
  assign buf_wdata = rx_data;

  assign rx_ack    = (state == ST_RX_ACK);
  assign tx_ready  = (state == ST_TX_ACK);
  assign is_sender = role_tx;
  assign fin       = (state == ST_IDLE);

  always_comb begin
    s_inc = 1'b0;
    if (state == ST_LOOP && inward) s_inc = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      flow       <= '0;
      addr       <= '0;
      clone_addr <= '0;
      word_count <= '0;
      idx        <= '0;
      tx_data    <= '0;
      role_tx    <= 1'b0;
      s_dec      <= 1'b0;
      ev_pure    <= 1'b0;
      ev_clone   <= 1'b0;
    end else begin
      s_dec    <= 1'b0;
      ev_pure  <= 1'b0;
      ev_clone <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          flow  <= flow_init;
          state <= ST_LOOP;
          if ((SIDE == SIDE_LEFT) ? (flow_init > 0) : (flow_init < 0)) begin
            role_tx <= 1'b0;
            addr    <= img_end;     // receiving appends after the S-image
          end else begin
            role_tx <= ((SIDE == SIDE_LEFT) ? (flow_init < 0) : (flow_init > 0));
            addr    <= img_start;   // sending starts at the S-image header
          end
          clone_addr <= img_start;
        end
        ST_LOOP: begin
          idx        <= '0;
          word_count <= '0;
          if (inward) begin
            flow  <= flow_step;
            state <= ST_RX_WAIT;
          end else if (outward) begin
            flow  <= flow_step;
            state <= ST_TX_RD;
          end else begin
            state <= ST_IDLE;
          end
        end
        // a word offered on the link is written as soon as it is seen
        ST_RX_WAIT: if (buf_done) begin
          if (buf_ok) begin
            addr       <= addr + 1'b1;
            word_count <= wc_nx;
            idx        <= idx_nx;
            state      <= ST_RX_ACK;
          end
        end
        ST_RX_ACK: if (!rx_ready) state <= last_word ? ST_LOOP : ST_RX_WAIT;
        ST_TX_RD: if (buf_done) begin
          if (buf_ok) begin
            tx_data    <= buf_rdata;
            addr       <= addr + 1'b1;
            word_count <= wc_nx;
            idx        <= idx_nx;
            // ready rises together with the data unless ack is still up
            state      <= tx_ack ? ST_TX_HS : ST_TX_ACK;
          end
        end
        ST_TX_HS: if (!tx_ack) state <= ST_TX_ACK;
        ST_TX_ACK: if (tx_ack) begin
          if (last_word) begin
            if (other_rx_pending || s_gt1) begin   // pure shifting
              clone_addr <= addr;
              s_dec      <= 1'b1;
              ev_pure    <= 1'b1;
            end else begin                         // cloning
              addr       <= clone_addr;
              ev_clone   <= 1'b1;
            end
            state <= ST_LOOP;
          end else begin
            state <= ST_TX_RD;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign ev_block  = (state == ST_RX_WAIT) && buf_done && !buf_ok;
  assign ev_starve = (state == ST_TX_RD) && buf_done && !buf_ok;

  // Handshake rules: data is stable while ready is high, and ready rises only
  // after the previous acknowledge has been withdrawn.
  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
    tx_ready && !tx_ack |=> $stable(tx_data));
  a_tx_rise: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(tx_ready) |-> !tx_ack);

endmodule
