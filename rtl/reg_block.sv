// reg_block: register block at the border of a PU slot.
//
// Two columns of registers with one connected register pair per bit of the
// PU IO interface. The shell drives and reads the left column, the PU the
// right column; every bit therefore takes exactly two clock cycles to cross,
// in either direction. This isolates the timing of shell and PU and gives
// both sides a fixed physical meeting point. Following the original design,
// the block holds nothing but the registers.
//
// Ports: shell_s2p -> pu_s2p (shell to PU bits), pu_p2s -> shell_p2s (PU to
// shell bits). Latency: 2 cycles each way, no throughput limit.
// This design's choice: all registers clear on the synchronous shell reset
// so that no handshake bit holds a stale value after power-up.
module reg_block #(
  parameter int S2P_W = 36,
  parameter int P2S_W = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [S2P_W-1:0] shell_s2p,
  output logic [S2P_W-1:0] pu_s2p,
  input  logic [P2S_W-1:0] pu_p2s,
  output logic [P2S_W-1:0] shell_p2s
);
  // left column: next to the shell; right column: inside the PU slot
  logic [S2P_W-1:0] left_s2p,  right_s2p;
  logic [P2S_W-1:0] left_p2s,  right_p2s;

  always_ff @(posedge clk) begin
    if (rst) begin
      left_s2p  <= '0;
      right_s2p <= '0;
      right_p2s <= '0;
      left_p2s  <= '0;
    end else begin
      left_s2p  <= shell_s2p;
      right_s2p <= left_s2p;
      right_p2s <= pu_p2s;
      left_p2s  <= right_p2s;
    end
  end

  assign pu_s2p    = right_s2p;
  assign shell_p2s = left_p2s;

endmodule
