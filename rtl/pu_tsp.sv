// pu_tsp: "Time Series Prediction" processing unit.
//
// The input stream is a series of signed 8-bit elements. For every element
// the PU predicts its sign from the K elements before it: element i of the
// history (i = 0 the most recent) is compared with configuration coefficient
// c[i], giving bit i of a K-bit index, and a 2^K-entry one-bit lookup table
// from the configuration turns that index into the prediction (1: the next
// element is >= 0). When the element arrives the PU counts the prediction as
// correct if it matches. Predictions start once K elements have been seen.
// After the last token the PU sends the 32-bit count of correct predictions
// as four tokens, least significant byte first.
//
// From the original: sign prediction from comparisons of the previous k = 7
// elements with k configured coefficients, a k-input lookup table from the
// configuration, the count of correct predictions as output. This design's
// choices: the comparison is "history > coefficient" (signed), the
// configuration layout (tokens 0..K-1 coefficients, padding up to token 7,
// then 2^K/8 table bytes, entry n at bit n%8 of byte n/8), the output format.
module pu_tsp #(
  parameter int IN_W = 8,
  parameter int K    = fleet_pkg::TSP_K
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic [IN_W-1:0] in_data,
  input  logic            in_last,
  output logic            in_ready,
  output logic            out_valid,
  output logic [7:0]      out_data,
  input  logic            out_ready
);
  localparam int NLUT     = 1 << K;
  localparam int COEF_TOK = 8;                  // coefficient slots
  localparam int CFG_TOK  = COEF_TOK + NLUT / 8;

  typedef enum logic [1:0] {S_CFG, S_DATA, S_EMIT, S_DONE} state_e;
  state_e state;

  logic signed [7:0] coef [K];
  logic [NLUT-1:0]   lut;
  logic signed [7:0] hist [K];
  logic [$clog2(K+1)-1:0] hist_cnt;
  logic [15:0]       cfg_cnt;
  logic [31:0]       correct;
  logic [1:0]        idx;
  logic [K-1:0]      cmp;
  logic              pred, actual;

  always_comb
    for (int i = 0; i < K; i++) cmp[i] = hist[i] > coef[i];

  assign pred      = lut[cmp];
  assign actual    = !in_data[7];            // element >= 0
  assign in_ready  = (state == S_CFG) || (state == S_DATA);
  assign out_valid = (state == S_EMIT);
  assign out_data  = correct[8*idx +: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_CFG;
      hist_cnt <= '0;
      cfg_cnt  <= '0;
      correct  <= '0;
      idx      <= '0;
      lut      <= '0;
      for (int i = 0; i < K; i++) begin
        coef[i] <= '0;
        hist[i] <= '0;
      end
    end else begin
      case (state)
        S_CFG: if (in_valid) begin
          for (int i = 0; i < K; i++)
            if (32'(cfg_cnt) == i) coef[i] <= signed'(in_data[7:0]);
          for (int b = 0; b < NLUT / 8; b++)
            if (32'(cfg_cnt) == COEF_TOK + b) lut[8*b +: 8] <= in_data[7:0];
          cfg_cnt <= cfg_cnt + 1'b1;
          if (32'(cfg_cnt) == CFG_TOK - 1) state <= S_DATA;
        end
        S_DATA: if (in_valid) begin
          if (32'(hist_cnt) == K) begin
            if (pred == actual) correct <= correct + 1'b1;
          end else begin
            hist_cnt <= hist_cnt + 1'b1;
          end
          hist[0] <= signed'(in_data[7:0]);
          for (int i = 1; i < K; i++) hist[i] <= hist[i-1];
          if (in_last) state <= S_EMIT;
        end
        S_EMIT: if (out_ready) begin
          idx <= idx + 1'b1;
          if (idx == 2'd3) state <= S_DONE;
        end
        default: ;
      endcase
    end
  end
endmodule
