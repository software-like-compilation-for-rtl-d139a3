// pu_summer: "Summer" processing unit.
//
// Adds up every 32-bit token it receives, its configuration token included,
// modulo 2^32. When the token flagged last has been added, it sends the sum
// as four 8-bit tokens, least significant byte first, and then stays idle
// until the next reset. The function is the original's; the output format
// and the one-token configuration are this design's choices.
//
// Stream ports: in_* valid/ready/last, out_* valid/ready; rst synchronous.
// Rate: one input token per cycle; four cycles to send the result.
module pu_summer #(
  parameter int IN_W = 32
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
  typedef enum logic [1:0] {S_SUM, S_EMIT, S_DONE} state_e;
  state_e      state;
  logic [31:0] acc;
  logic [1:0]  idx;

  assign in_ready  = (state == S_SUM);
  assign out_valid = (state == S_EMIT);
  assign out_data  = acc[8*idx +: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_SUM;
      acc   <= '0;
      idx   <= '0;
    end else begin
      case (state)
        S_SUM: if (in_valid) begin
          acc <= acc + 32'(in_data);
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
