// pu_port: PU-side end of the latency-insensitive PU IO interface.
//
// It sits between the right column of a slot's register block and the PU
// core. Incoming beats (data + last flag) land in a small grant-based buffer
// (li_rx_fifo), whose grant is the interface's in_ready bit; the core reads
// the buffer with an ordinary valid/ready handshake. Outgoing tokens are sent
// only in cycles where the shell's out_ready grant is seen, one token per
// grant, so the shell's buffer cannot overflow either. The interface reset
// bit becomes the core's synchronous reset.
//
// Timing: a beat granted at cycle t reaches the buffer by t + LAT.
// Everything here is this design's own choice; the original only requires
// the interface to be latency-insensitive.
module pu_port #(
  parameter int IN_W  = 32,
  parameter int DEPTH = fleet_pkg::LI_DEPTH,
  parameter int LAT   = fleet_pkg::LI_LAT
) (
  input  logic                      clk,
  // interface side (register block, right column)
  input  logic [IN_W-1:0]           if_in_data,
  input  logic                      if_in_valid,
  input  logic                      if_in_last,
  input  logic                      if_out_ready,  // grant from the shell
  input  logic                      if_pu_rst,
  output logic                      if_in_ready,   // grant to the shell
  output logic [fleet_pkg::OUT_W-1:0] if_out_data,
  output logic                      if_out_valid,
  // core side
  output logic                      core_rst,
  output logic                      core_in_valid,
  output logic [IN_W-1:0]           core_in_data,
  output logic                      core_in_last,
  input  logic                      core_in_ready,
  input  logic                      core_out_valid,
  input  logic [fleet_pkg::OUT_W-1:0] core_out_data,
  output logic                      core_out_ready
);
  assign core_rst = if_pu_rst;

  li_rx_fifo #(.W(IN_W + 1), .DEPTH(DEPTH), .LAT(LAT)) u_in_buf (
    .clk      (clk),
    .rst      (if_pu_rst),
    .wr_valid (if_in_valid),
    .wr_data  ({if_in_last, if_in_data}),
    .grant    (if_in_ready),
    .rd_valid (core_in_valid),
    .rd_data  ({core_in_last, core_in_data}),
    .rd_ready (core_in_ready)
  );

  assign core_out_ready = if_out_ready && !if_pu_rst;
  assign if_out_valid   = core_out_valid && core_out_ready;
  assign if_out_data    = core_out_data;

endmodule
