// fleet_top: streaming accelerator with NUM_PU replicated processing units.
//
// A connectivity shell reads per-PU configuration and one shared data
// stream from memory, broadcasts the stream to NUM_PU identical PUs and
// writes their results back. Each PU slot is separated from the shell by a
// register block (two registers per interface bit), so the shell-to-PU
// interface is latency-insensitive and every slot presents the same
// registered boundary. All slots hold the PU kind chosen by PU_KIND.
//
// Ports: clock, synchronous reset, job control (start, base addresses,
// data length, busy/done), one AXI4-Lite-style memory port standing in for
// the DDR channel, and two event flags (broadcast stall, output contention)
// for performance counting. NUM_PU = 180 is the slot count of the original
// designs (4 slot columns of 30 slots and 6 of 10).
//
// EXTRA_REGS adds that many further register stages in each direction
// between the shell and every register block, for long routes at a higher
// clock rate; the original runs at 125 MHz without them (EXTRA_REGS = 0)
// and names this as the way to go faster. The interface tolerates any
// number: the grant window (LAT) of both ends grows by two per stage.
module fleet_top
  import fleet_pkg::*;
#(
  parameter pu_kind_e PU_KIND = PU_KNN,
  parameter int NUM_PU = 180,
  parameter int ADDR_W = 64,
  parameter int EXTRA_REGS = 0
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
  output logic [ADDR_W-1:0] m_ar_addr,
  output logic              m_ar_valid,
  input  logic              m_ar_ready,
  input  logic [31:0]       m_r_data,
  input  logic              m_r_valid,
  output logic              m_r_ready,
  output logic [ADDR_W-1:0] m_aw_addr,
  output logic              m_aw_valid,
  input  logic              m_aw_ready,
  output logic [31:0]       m_w_data,
  output logic [3:0]        m_w_strb,
  output logic              m_w_valid,
  input  logic              m_w_ready,
  input  logic              m_b_valid,
  output logic              m_b_ready
);
  localparam int S2P_W = s2p_width(PU_KIND);
  localparam int LAT   = LI_LAT + 2 * EXTRA_REGS;

  // the two directions together must make up the whole PU IO interface
  if (S2P_W + P2S_W != if_width(PU_KIND)) begin : g_width_check
    $error("PU IO interface bit split does not add up");
  end

  logic [S2P_W-1:0] shell_s2p [NUM_PU];
  logic [S2P_W-1:0] slot_s2p  [NUM_PU];
  logic [P2S_W-1:0] shell_p2s [NUM_PU];
  logic [P2S_W-1:0] slot_p2s  [NUM_PU];
  logic [S2P_W-1:0] blk_s2p   [NUM_PU];   // left column of each register block
  logic [P2S_W-1:0] blk_p2s   [NUM_PU];

  connectivity_shell #(.PU_KIND(PU_KIND), .NUM_PU(NUM_PU), .ADDR_W(ADDR_W), .LAT(LAT)) u_shell (
    .clk, .rst, .start, .cfg_base, .data_base, .data_words, .out_base,
    .busy, .done, .bcast_stall, .out_contention,
    .ar_addr(m_ar_addr), .ar_valid(m_ar_valid), .ar_ready(m_ar_ready),
    .r_data(m_r_data), .r_valid(m_r_valid), .r_ready(m_r_ready),
    .aw_addr(m_aw_addr), .aw_valid(m_aw_valid), .aw_ready(m_aw_ready),
    .w_data(m_w_data), .w_strb(m_w_strb), .w_valid(m_w_valid), .w_ready(m_w_ready),
    .b_valid(m_b_valid), .b_ready(m_b_ready),
    .s2p(shell_s2p), .p2s(shell_p2s)
  );

  for (genvar i = 0; i < NUM_PU; i++) begin : g_slot
    if (EXTRA_REGS == 0) begin : g_direct
      assign blk_s2p[i]   = shell_s2p[i];
      assign shell_p2s[i] = blk_p2s[i];
    end else begin : g_pipe
      logic [S2P_W-1:0] s2p_q [EXTRA_REGS];
      logic [P2S_W-1:0] p2s_q [EXTRA_REGS];
      always_ff @(posedge clk) begin
        if (rst) begin
          for (int k = 0; k < EXTRA_REGS; k++) begin
            s2p_q[k] <= '0;
            p2s_q[k] <= '0;
          end
        end else begin
          s2p_q[0] <= shell_s2p[i];
          p2s_q[0] <= blk_p2s[i];
          for (int k = 1; k < EXTRA_REGS; k++) begin
            s2p_q[k] <= s2p_q[k-1];
            p2s_q[k] <= p2s_q[k-1];
          end
        end
      end
      assign blk_s2p[i]   = s2p_q[EXTRA_REGS-1];
      assign shell_p2s[i] = p2s_q[EXTRA_REGS-1];
    end
    reg_block #(.S2P_W(S2P_W), .P2S_W(P2S_W)) u_regs (
      .clk, .rst,
      .shell_s2p(blk_s2p[i]), .pu_s2p(slot_s2p[i]),
      .pu_p2s(slot_p2s[i]),   .shell_p2s(blk_p2s[i])
    );
    pu_slot #(.PU_KIND(PU_KIND), .LAT(LAT)) u_slot (
      .clk, .s2p(slot_s2p[i]), .p2s(slot_p2s[i])
    );
  end

endmodule
