// input_stream_ctrl: input side of the connectivity shell.
//
// For one job it reads memory through an AXI4-Lite-style read channel and
// feeds the PUs. First it holds all PUs in reset for RST_CYCLES cycles
// (the interface reset bit). Then it sends every PU its own configuration,
// PU 0 first: CFG_WORDS words per PU, stored back to back from cfg_base.
// Last it broadcasts the shared data stream, data_words words from
// data_base, to all PUs at once; the final token carries the last flag.
// Each memory word is cut into MEM_W/IN_W tokens, lowest bits first.
//
// Flow control: pu_grant[i] is PU i's in_ready as seen after the register
// block. A grant allows one beat to that PU in that cycle. A configuration
// token goes to its PU in a cycle where that PU grants; a data token goes
// to all PUs in a cycle where every PU grants, so the broadcast runs at the
// pace of the slowest PU (the broadcast stall). Reads are prefetched: up to
// PF_DEPTH words are requested ahead, and the read data channel is always
// ready because space for every request is reserved.
//
// From the original: one shared stream sent to all PUs, each PU getting
// unique configuration before it, fetched from a single DDR channel over
// AXI. The memory layout, reset phase, token packing and the bus subset
// (single-beat 32-bit reads, in-order responses) are this design's choices.
module input_stream_ctrl #(
  parameter int NUM_PU     = 180,
  parameter int IN_W       = 32,
  parameter int CFG_WORDS  = 1,
  parameter int ADDR_W     = 64,
  parameter int PF_DEPTH   = 8,
  parameter int RST_CYCLES = 12
) (
  input  logic              clk,
  input  logic              rst,
  // job control
  input  logic              start,
  input  logic [ADDR_W-1:0] cfg_base,
  input  logic [ADDR_W-1:0] data_base,
  input  logic [31:0]       data_words,
  output logic              busy,
  output logic              pu_rst,
  output logic              in_done,
  output logic              bcast_stall,   // a data token waits for a PU
  // memory read channel
  output logic [ADDR_W-1:0] ar_addr,
  output logic              ar_valid,
  input  logic              ar_ready,
  input  logic [31:0]       r_data,
  input  logic              r_valid,
  output logic              r_ready,
  // PU side
  input  logic [NUM_PU-1:0] pu_grant,
  output logic [NUM_PU-1:0] pu_valid,
  output logic [IN_W-1:0]   tok_data,
  output logic              tok_last
);
  localparam int MEM_W  = fleet_pkg::MEM_W;
  localparam int TPW    = MEM_W / IN_W;
  localparam int PW     = (NUM_PU > 1) ? $clog2(NUM_PU) : 1;
  localparam int FW     = $clog2(PF_DEPTH);
  localparam int CFG_TOTAL = NUM_PU * CFG_WORDS;

  typedef enum logic [2:0] {S_IDLE, S_RESET, S_CFG, S_DATA, S_DONE} state_e;
  state_e state;

  // ---------------- word reader with prefetch buffer ----------------
  logic [31:0]         issue_idx, total_words;
  logic [$clog2(PF_DEPTH+1)-1:0] reserved, pf_count;
  logic [MEM_W-1:0]    pf_mem [PF_DEPTH];
  logic [FW-1:0]       pf_wptr, pf_rptr;
  logic                do_issue, word_pop, reading;
  logic [ADDR_W-1:0]   next_addr;

  assign reading   = (state == S_CFG) || (state == S_DATA);
  assign do_issue  = reading && (issue_idx < total_words) &&
                     (32'(reserved) < PF_DEPTH) && (!ar_valid || ar_ready);
  assign next_addr = (issue_idx < CFG_TOTAL)
                   ? cfg_base  + ADDR_W'({issue_idx, 2'b00})
                   : data_base + ADDR_W'({issue_idx - CFG_TOTAL, 2'b00});
  assign r_ready   = 1'b1;

  // ---------------- token stage ----------------
  logic [$clog2(TPW+1)-1:0] tok_sel;
  logic                tok_avail, tok_take, all_grant;
  logic [PW-1:0]       cfg_pu;
  logic [15:0]         cfg_tok;
  logic [31:0]         data_tok, data_tokens;
  logic [15:0]         rst_cnt;

  assign tok_avail   = (pf_count != 0);
  assign tok_data    = pf_mem[pf_rptr][IN_W*tok_sel +: IN_W];
  assign all_grant   = &pu_grant;
  assign data_tokens = data_words * TPW;
  assign tok_last    = (state == S_DATA) && (data_tok == data_tokens - 1);

  always_comb begin
    pu_valid = '0;
    tok_take = 1'b0;
    if (state == S_CFG && tok_avail && pu_grant[cfg_pu]) begin
      pu_valid[cfg_pu] = 1'b1;
      tok_take         = 1'b1;
    end else if (state == S_DATA && tok_avail && all_grant) begin
      pu_valid = '1;
      tok_take = 1'b1;
    end
  end
  assign word_pop    = tok_take && (32'(tok_sel) == TPW - 1);
  assign bcast_stall = (state == S_DATA) && tok_avail && !all_grant;
  assign busy        = (state != S_IDLE) && (state != S_DONE);
  assign in_done     = (state == S_DONE);
  assign pu_rst      = (state == S_RESET);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      ar_valid  <= 1'b0;
      ar_addr   <= '0;
      issue_idx <= '0;
      total_words <= '0;
      reserved  <= '0;
      pf_count  <= '0;
      pf_wptr   <= '0;
      pf_rptr   <= '0;
      tok_sel   <= '0;
      cfg_pu    <= '0;
      cfg_tok   <= '0;
      data_tok  <= '0;
      rst_cnt   <= '0;
    end else begin
      // read address channel
      if (ar_valid && ar_ready) ar_valid <= 1'b0;
      if (do_issue) begin
        ar_valid  <= 1'b1;
        ar_addr   <= next_addr;
        issue_idx <= issue_idx + 1;
      end
      reserved <= reserved + 1'(do_issue) - 1'(word_pop);
      // read data into the prefetch buffer
      if (r_valid) begin
        pf_mem[pf_wptr] <= r_data;
        pf_wptr <= pf_wptr + 1'b1;
      end
      if (word_pop) pf_rptr <= pf_rptr + 1'b1;
      pf_count <= pf_count + 1'(r_valid) - 1'(word_pop);
      if (tok_take) tok_sel <= (32'(tok_sel) == TPW - 1) ? '0 : tok_sel + 1'b1;

      case (state)
        S_IDLE, S_DONE: if (start) begin
          state       <= S_RESET;
          rst_cnt     <= '0;
          issue_idx   <= '0;
          total_words <= CFG_TOTAL + data_words;
          cfg_pu      <= '0;
          cfg_tok     <= '0;
          data_tok    <= '0;
          tok_sel     <= '0;
        end
        S_RESET: begin
          rst_cnt <= rst_cnt + 1'b1;
          if (32'(rst_cnt) == RST_CYCLES - 1) state <= S_CFG;
        end
        S_CFG: if (tok_take) begin
          if (32'(cfg_tok) == CFG_WORDS * TPW - 1) begin
            cfg_tok <= '0;
            cfg_pu  <= cfg_pu + 1'b1;
            if (32'(cfg_pu) == NUM_PU - 1) state <= S_DATA;
          end else begin
            cfg_tok <= cfg_tok + 1'b1;
          end
        end
        S_DATA: if (tok_take) begin
          data_tok <= data_tok + 1;
          if (tok_last) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Read data must only come for requests that were made.
  a_r_expected : assert property (@(posedge clk) disable iff (rst)
    r_valid |-> (32'(pf_count) < PF_DEPTH))
    else $error("input_stream_ctrl: unexpected read data");

endmodule
