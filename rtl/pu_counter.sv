// pu_counter: "Counter" processing unit.
//
// Counts how often each distinct 8-bit input word occurs, in a 256-entry
// table held in block RAM (one CNT_W-bit counter per word value, wrapping).
// After a reset it first clears the table, one entry per cycle, and only
// then accepts input. Its first CFG_TOKENS tokens are configuration, which
// this PU discards. Each data token is a read-modify-write: the table is
// read at the cycle the token is accepted and the incremented count written
// back in the next cycle. When two equal words follow each other, the read
// returns the value from before the pending write, so the written value is
// forwarded instead (the bypass). One token per cycle is thus sustained.
// After the last token it reads the table out in address order and sends
// every count as CNT_W/8 tokens, least significant byte first.
//
// The function (a count per distinct input word, in BRAM) is the
// original's; table size, count width, clearing and output order are this
// design's choices.
module pu_counter #(
  parameter int IN_W       = 8,
  parameter int CFG_TOKENS = 4,
  parameter int CNT_W      = fleet_pkg::CNT_W
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic [IN_W-1:0] in_data,
  input  logic            in_last,
  output logic            in_ready,
  output logic            out_valid,
  output logic [7:0]      out_data,
  input  logic            out_ready,
  output logic            bypass_used   // pulse: a count was forwarded
);
  localparam int N      = 1 << IN_W;
  localparam int NBYTES = CNT_W / 8;

  typedef enum logic [2:0] {S_CLEAR, S_CFG, S_COUNT, S_DRAIN, S_RD, S_EMIT, S_DONE} state_e;
  state_e state;

  (* ram_style = "block" *) logic [CNT_W-1:0] table_q [N];

  logic [IN_W-1:0]  addr_ptr;     // clear / read-out address
  logic [15:0]      cfg_cnt;
  // read-modify-write pipeline
  logic             s1_valid;
  logic [IN_W-1:0]  s1_addr;
  logic [CNT_W-1:0] rdata;
  logic             fwd;
  logic [CNT_W-1:0] fwd_val;
  logic [CNT_W-1:0] new_cnt;
  // read-out
  logic [$clog2(NBYTES+1)-1:0] byte_idx;

  logic             acc_tok;
  logic             ram_we;
  logic [IN_W-1:0]  ram_waddr;
  logic [CNT_W-1:0] ram_wdata;
  logic [IN_W-1:0]  ram_raddr;

  assign in_ready  = (state == S_CFG) || (state == S_COUNT);
  assign acc_tok   = in_valid && (state == S_COUNT);
  assign new_cnt   = (fwd ? fwd_val : rdata) + 1'b1;
  assign out_valid = (state == S_EMIT);
  assign out_data  = rdata[8*byte_idx +: 8];  // read address is held during S_EMIT
  assign bypass_used = s1_valid && fwd;

  always_comb begin
    ram_we    = 1'b0;
    ram_waddr = s1_addr;
    ram_wdata = new_cnt;
    if (state == S_CLEAR) begin
      ram_we    = 1'b1;
      ram_waddr = addr_ptr;
      ram_wdata = '0;
    end else if (s1_valid) begin
      ram_we    = 1'b1;
    end
    ram_raddr = (state == S_COUNT) ? in_data : addr_ptr;
  end

  // block RAM: one write port, one synchronous read port (read before write)
  always_ff @(posedge clk) begin
    if (ram_we) table_q[ram_waddr] <= ram_wdata;
    rdata <= table_q[ram_raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_CLEAR;
      addr_ptr  <= '0;
      cfg_cnt   <= '0;
      s1_valid  <= 1'b0;
      s1_addr   <= '0;
      fwd       <= 1'b0;
      fwd_val   <= '0;
      byte_idx  <= '0;
    end else begin
      s1_valid <= acc_tok;
      s1_addr  <= in_data;
      fwd      <= acc_tok && s1_valid && (s1_addr == in_data);
      fwd_val  <= new_cnt;
      case (state)
        S_CLEAR: begin
          addr_ptr <= addr_ptr + 1'b1;
          if (32'(addr_ptr) == N - 1) state <= (CFG_TOKENS == 0) ? S_COUNT : S_CFG;
        end
        S_CFG: if (in_valid) begin
          cfg_cnt <= cfg_cnt + 1'b1;
          if (32'(cfg_cnt) == CFG_TOKENS - 1) state <= S_COUNT;
          if (in_last) state <= S_DRAIN;
        end
        S_COUNT: if (in_valid && in_last) state <= S_DRAIN;
        S_DRAIN: begin            // let the last write land
          addr_ptr <= '0;
          state    <= S_RD;
        end
        S_RD: begin               // read issued here, rdata valid in S_EMIT
          byte_idx <= '0;
          state    <= S_EMIT;
        end
        S_EMIT: if (out_ready) begin
          byte_idx <= byte_idx + 1'b1;
          if (32'(byte_idx) == NBYTES - 1) begin
            addr_ptr <= addr_ptr + 1'b1;
            state    <= (32'(addr_ptr) == N - 1) ? S_DONE : S_RD;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
