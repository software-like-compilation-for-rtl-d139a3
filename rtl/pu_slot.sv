// pu_slot: one PU slot, i.e. everything to the right of a register block.
//
// It unpacks the PU IO interface bits coming from the register block's
// right column, runs them through pu_port (input buffer with grants, output
// sender) and instantiates the PU core selected by PU_KIND. All slots of one
// accelerator hold the same PU kind, as in the original design, where one
// PU is replicated into every slot.
//
// Bit layout of the interface (this design's choice):
//   s2p = {pu_rst, out_ready, in_last, in_valid, in_data[IN_W-1:0]}
//   p2s = {out_valid, out_data[7:0], in_ready}
module pu_slot
  import fleet_pkg::*;
#(
  parameter pu_kind_e PU_KIND = PU_KNN,
  parameter int LAT = LI_LAT,      // grant-to-arrival latency, see pu_port
  localparam int IN_W  = in_width(PU_KIND),
  localparam int S2P_W = s2p_width(PU_KIND)
) (
  input  logic             clk,
  input  logic [S2P_W-1:0] s2p,
  output logic [P2S_W-1:0] p2s
);
  logic              core_rst;
  logic              c_in_valid, c_in_last, c_in_ready;
  logic [IN_W-1:0]   c_in_data;
  logic              c_out_valid, c_out_ready;
  logic [OUT_W-1:0]  c_out_data;
  logic              if_in_ready, if_out_valid;
  logic [OUT_W-1:0]  if_out_data;
  logic              bypass_event;   // Counter PU forwarded a count; for observation only

  pu_port #(.IN_W(IN_W), .LAT(LAT)) u_port (
    .clk            (clk),
    .if_in_data     (s2p[IN_W-1:0]),
    .if_in_valid    (s2p[IN_W]),
    .if_in_last     (s2p[IN_W+1]),
    .if_out_ready   (s2p[IN_W+2]),
    .if_pu_rst      (s2p[IN_W+3]),
    .if_in_ready    (if_in_ready),
    .if_out_data    (if_out_data),
    .if_out_valid   (if_out_valid),
    .core_rst       (core_rst),
    .core_in_valid  (c_in_valid),
    .core_in_data   (c_in_data),
    .core_in_last   (c_in_last),
    .core_in_ready  (c_in_ready),
    .core_out_valid (c_out_valid),
    .core_out_data  (c_out_data),
    .core_out_ready (c_out_ready)
  );

  assign p2s = {if_out_valid, if_out_data, if_in_ready};

  generate
    case (PU_KIND)
      PU_SUMMER: begin : g_core
        assign bypass_event = 1'b0;
        pu_summer #(.IN_W(IN_W)) u_core (
          .clk(clk), .rst(core_rst),
          .in_valid(c_in_valid), .in_data(c_in_data), .in_last(c_in_last), .in_ready(c_in_ready),
          .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(c_out_ready));
      end
      PU_DOT: begin : g_core
        assign bypass_event = 1'b0;
        pu_dot #(.IN_W(IN_W), .CFG_TOKENS(cfg_tokens(PU_DOT))) u_core (
          .clk(clk), .rst(core_rst),
          .in_valid(c_in_valid), .in_data(c_in_data), .in_last(c_in_last), .in_ready(c_in_ready),
          .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(c_out_ready));
      end
      PU_COUNTER: begin : g_core
        pu_counter #(.IN_W(IN_W), .CFG_TOKENS(cfg_tokens(PU_COUNTER))) u_core (
          .clk(clk), .rst(core_rst),
          .in_valid(c_in_valid), .in_data(c_in_data), .in_last(c_in_last), .in_ready(c_in_ready),
          .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(c_out_ready),
          .bypass_used(bypass_event));
      end
      PU_TSP: begin : g_core
        assign bypass_event = 1'b0;
        pu_tsp #(.IN_W(IN_W)) u_core (
          .clk(clk), .rst(core_rst),
          .in_valid(c_in_valid), .in_data(c_in_data), .in_last(c_in_last), .in_ready(c_in_ready),
          .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(c_out_ready));
      end
      default: begin : g_core
        assign bypass_event = 1'b0;
        pu_knn #(.IN_W(IN_W)) u_core (
          .clk(clk), .rst(core_rst),
          .in_valid(c_in_valid), .in_data(c_in_data), .in_last(c_in_last), .in_ready(c_in_ready),
          .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(c_out_ready));
      end
    endcase
  endgenerate

endmodule
