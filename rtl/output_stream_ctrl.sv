// output_stream_ctrl: output side of the connectivity shell.
//
// Every PU's 8-bit output tokens arrive, after the register block, in a
// grant-based receive buffer of its own (li_rx_fifo; its grant is the
// interface's out_ready bit). A round-robin arbiter picks the next PU with
// a buffered token, starting after the PU served last, and the token is
// written to memory through an AXI4-Lite-style write channel: address and
// data are offered together, then the write response is awaited. Token j
// of PU i goes to word (i * OUT_LEN + j) after out_base, zero-extended to
// 32 bits. The job is done when all NUM_PU * OUT_LEN tokens are written.
// `clear` empties the buffers and restarts the counts for a new job.
//
// From the original: an output stream controller that takes the PUs'
// outputs to DDR. The memory layout, one token per word, the arbitration
// and the single outstanding write are this design's choices.
module output_stream_ctrl #(
  parameter int NUM_PU  = 180,
  parameter int OUT_LEN = 4,
  parameter int ADDR_W  = 64,
  parameter int LAT     = fleet_pkg::LI_LAT   // grant-to-arrival latency of the slot path
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic [ADDR_W-1:0] out_base,
  output logic              out_done,
  output logic              contention,   // a PU waits while another is served
  // PU side
  input  logic [NUM_PU-1:0] pu_valid,
  input  logic [7:0]        pu_data [NUM_PU],
  output logic [NUM_PU-1:0] pu_grant,
  // memory write channel
  output logic [ADDR_W-1:0] aw_addr,
  output logic              aw_valid,
  input  logic              aw_ready,
  output logic [31:0]       w_data,
  output logic [3:0]        w_strb,
  output logic              w_valid,
  input  logic              w_ready,
  input  logic              b_valid,
  output logic              b_ready
);
  localparam int PW = (NUM_PU > 1) ? $clog2(NUM_PU) : 1;
  localparam int CW = $clog2(OUT_LEN + 1);
  localparam int TOTAL = NUM_PU * OUT_LEN;

  typedef enum logic [1:0] {S_PICK, S_SEND, S_RESP} state_e;
  state_e state;

  logic [NUM_PU-1:0] req, pop;
  logic [7:0]        rx_data [NUM_PU];
  logic [CW-1:0]     cnt [NUM_PU];
  logic [PW-1:0]     ptr, pick, sel;
  logic              found;
  logic [31:0]       written;

  for (genvar i = 0; i < NUM_PU; i++) begin : g_rx
    li_rx_fifo #(.W(8), .DEPTH(fleet_pkg::LI_DEPTH), .LAT(LAT)) u_rx (
      .clk      (clk),
      .rst      (rst || clear),
      .wr_valid (pu_valid[i]),
      .wr_data  (pu_data[i]),
      .grant    (pu_grant[i]),
      .rd_valid (req[i]),
      .rd_data  (rx_data[i]),
      .rd_ready (pop[i])
    );
  end

  // round-robin: first requester at or after ptr, else the first one
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = 0; i < NUM_PU; i++)
      if (!found && req[i] && i >= 32'(ptr)) begin
        found = 1'b1;
        pick  = PW'(i);
      end
    for (int i = 0; i < NUM_PU; i++)
      if (!found && req[i]) begin
        found = 1'b1;
        pick  = PW'(i);
      end
  end

  always_comb begin
    pop = '0;
    if (state == S_PICK && found) pop[pick] = 1'b1;
  end

  assign w_strb     = 4'hF;
  assign b_ready    = (state == S_RESP);
  assign out_done   = (written == TOTAL);
  assign contention = (state != S_PICK) && (|req);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      state    <= S_PICK;
      ptr      <= '0;
      sel      <= '0;
      written  <= '0;
      aw_valid <= 1'b0;
      w_valid  <= 1'b0;
      aw_addr  <= '0;
      w_data   <= '0;
      for (int i = 0; i < NUM_PU; i++) cnt[i] <= '0;
    end else begin
      case (state)
        S_PICK: if (found) begin
          sel      <= pick;
          aw_addr  <= out_base + ADDR_W'({32'(pick) * OUT_LEN + 32'(cnt[pick]), 2'b00});
          w_data   <= 32'(rx_data[pick]);
          aw_valid <= 1'b1;
          w_valid  <= 1'b1;
          state    <= S_SEND;
        end
        S_SEND: begin
          if (aw_ready) aw_valid <= 1'b0;
          if (w_ready)  w_valid  <= 1'b0;
          if ((!aw_valid || aw_ready) && (!w_valid || w_ready)) state <= S_RESP;
        end
        S_RESP: if (b_valid) begin
          cnt[sel] <= cnt[sel] + 1'b1;
          written  <= written + 1;
          ptr      <= (32'(sel) == NUM_PU - 1) ? '0 : sel + 1'b1;
          state    <= S_PICK;
        end
        default: state <= S_PICK;
      endcase
    end
  end

  a_no_extra : assert property (@(posedge clk) disable iff (rst || clear)
    !(state == S_PICK && found && 32'(cnt[pick]) >= OUT_LEN))
    else $error("output_stream_ctrl: PU sent more than OUT_LEN tokens");

endmodule
