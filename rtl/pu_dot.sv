// pu_dot: "Dot" processing unit.
//
// Computes the dot product of two vectors whose elements arrive interleaved
// (a0, b0, a1, b1, ...), as 32-bit tokens, accumulating a_i * b_i modulo
// 2^32 (the low 32 bits are the same for signed and unsigned operands). The
// multiplier maps to DSP blocks. Its first CFG_TOKENS tokens are its
// configuration, which this PU does not use and discards. After the token
// flagged last it sends the 32-bit result as four 8-bit tokens, least
// significant byte first. The interleaved dot product is the original's;
// configuration handling and output format are this design's choices.
//
// Rate: one input token per cycle; four cycles to send the result.
module pu_dot #(
  parameter int IN_W       = 32,
  parameter int CFG_TOKENS = 1
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
  typedef enum logic [1:0] {S_CFG, S_DOT, S_EMIT, S_DONE} state_e;
  state_e      state;
  logic [31:0] acc, a_hold;
  logic        have_a;
  logic [15:0] cfg_cnt;
  logic [1:0]  idx;
  logic [31:0] prod;

  assign prod      = a_hold * 32'(in_data);
  assign in_ready  = (state == S_CFG) || (state == S_DOT);
  assign out_valid = (state == S_EMIT);
  assign out_data  = acc[8*idx +: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= (CFG_TOKENS == 0) ? S_DOT : S_CFG;
      acc     <= '0;
      a_hold  <= '0;
      have_a  <= 1'b0;
      cfg_cnt <= '0;
      idx     <= '0;
    end else begin
      case (state)
        S_CFG: if (in_valid) begin
          cfg_cnt <= cfg_cnt + 1'b1;
          if (32'(cfg_cnt) == CFG_TOKENS - 1) state <= S_DOT;
          if (in_last) state <= S_EMIT;
        end
        S_DOT: if (in_valid) begin
          if (have_a) acc <= acc + prod;
          else        a_hold <= 32'(in_data);
          have_a <= !have_a;
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
