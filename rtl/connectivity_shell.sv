// connectivity_shell: the domain's connectivity infrastructure.
//
// It joins the memory channel (AXI4-Lite-style read and write channels of
// one DDR channel) to NUM_PU PU slots. Its input stream controller sends
// each PU its configuration and then the shared data stream; its output
// stream controller gathers the PUs' output tokens into memory. Toward each
// slot it drives the left column of that slot's register block: bits
// s2p[i] = {pu_rst, out_ready, in_last, in_valid, in_data} and reads
// p2s[i] = {out_valid, out_data, in_ready}. All IN_W data bits, in_last and
// pu_rst are the same for every slot; in_valid and out_ready are per slot.
//
// Job control (standing in for host registers): pulse `start` with the
// three base addresses and the data length held; `done` rises when every
// PU's output is in memory. The shell does not depend on the PU's insides,
// only on the PU kind's token width, configuration length and output length.
// LAT is the number of cycles from a grant leaving one end of the interface
// to the granted beat arriving back (2 x the register stages on the path);
// the PU reset phase is stretched with it so that grants still in flight
// from an earlier job have drained before configuration starts.
module connectivity_shell
  import fleet_pkg::*;
#(
  parameter pu_kind_e PU_KIND = PU_KNN,
  parameter int NUM_PU = 180,
  parameter int ADDR_W = 64,
  parameter int LAT    = LI_LAT,   // round trip to a slot's PU port, cycles
  localparam int IN_W  = in_width(PU_KIND),
  localparam int S2P_W = s2p_width(PU_KIND)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [ADDR_W-1:0] cfg_base,
  input  logic [ADDR_W-1:0] data_base,
  input  logic [31:0]       data_words,
  input  logic [ADDR_W-1:0] out_base,
  output logic              busy,
  output logic              done,
  output logic              bcast_stall,
  output logic              out_contention,
  // memory
  output logic [ADDR_W-1:0] ar_addr,
  output logic              ar_valid,
  input  logic              ar_ready,
  input  logic [31:0]       r_data,
  input  logic              r_valid,
  output logic              r_ready,
  output logic [ADDR_W-1:0] aw_addr,
  output logic              aw_valid,
  input  logic              aw_ready,
  output logic [31:0]       w_data,
  output logic [3:0]        w_strb,
  output logic              w_valid,
  input  logic              w_ready,
  input  logic              b_valid,
  output logic              b_ready,
  // PU slots (left columns of the register blocks)
  output logic [S2P_W-1:0]  s2p [NUM_PU],
  input  logic [P2S_W-1:0]  p2s [NUM_PU]
);
  logic [NUM_PU-1:0] in_grant, in_valid, out_grant, out_valid;
  logic [7:0]        out_data [NUM_PU];
  logic [IN_W-1:0]   tok_data;
  logic              tok_last, pu_rst, in_done, out_done;
  logic              started;

  for (genvar i = 0; i < NUM_PU; i++) begin : g_if
    assign s2p[i]       = {pu_rst, out_grant[i], tok_last, in_valid[i], tok_data};
    assign in_grant[i]  = p2s[i][0];
    assign out_data[i]  = p2s[i][8:1];
    assign out_valid[i] = p2s[i][9];
  end

  input_stream_ctrl #(
    .NUM_PU(NUM_PU), .IN_W(IN_W), .CFG_WORDS(cfg_words(PU_KIND)), .ADDR_W(ADDR_W),
    .RST_CYCLES(8 + LAT)
  ) u_in (
    .clk, .rst, .start, .cfg_base, .data_base, .data_words,
    .busy(), .pu_rst, .in_done, .bcast_stall,
    .ar_addr, .ar_valid, .ar_ready, .r_data, .r_valid, .r_ready,
    .pu_grant(in_grant), .pu_valid(in_valid), .tok_data, .tok_last
  );

  output_stream_ctrl #(
    .NUM_PU(NUM_PU), .OUT_LEN(out_len(PU_KIND)), .ADDR_W(ADDR_W), .LAT(LAT)
  ) u_out (
    .clk, .rst, .clear(pu_rst), .out_base, .out_done, .contention(out_contention),
    .pu_valid(out_valid), .pu_data(out_data), .pu_grant(out_grant),
    .aw_addr, .aw_valid, .aw_ready, .w_data, .w_strb, .w_valid, .w_ready,
    .b_valid, .b_ready
  );

  // done only after a job has been started
  always_ff @(posedge clk) begin
    if (rst)        started <= 1'b0;
    else if (start) started <= 1'b1;
  end

  assign done = started && in_done && out_done && !start;
  assign busy = started && !done;

endmodule
