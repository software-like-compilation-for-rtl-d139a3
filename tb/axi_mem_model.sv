// axi_mem_model: behavioural memory for testbenches, standing in for a DDR
// channel behind an AXI4-Lite-style port (single-beat 32-bit reads and
// writes, in-order responses). Its ready signals and response delays are
// random so that the design sees back-pressure. The word array `mem` is
// loaded and inspected by the testbench through hierarchical references.
// Addresses are byte addresses; bits above the array size are ignored.
module axi_mem_model #(
  parameter int ADDR_W = 64,
  parameter int WORDS  = 65536,
  parameter int STALL_PCT = 30
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] ar_addr,
  input  logic              ar_valid,
  output logic              ar_ready,
  output logic [31:0]       r_data,
  output logic              r_valid,
  input  logic              r_ready,
  input  logic [ADDR_W-1:0] aw_addr,
  input  logic              aw_valid,
  output logic              aw_ready,
  input  logic [31:0]       w_data,
  input  logic [3:0]        w_strb,
  input  logic              w_valid,
  output logic              w_ready,
  output logic              b_valid,
  input  logic              b_ready
);
  localparam int IW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  logic [31:0] rq [$];
  int          rdelay;
  logic        have_aw, have_w;
  logic [ADDR_W-1:0] aw_q;
  logic [31:0] w_q;
  int unsigned stalls;

  always_ff @(posedge clk) begin
    if (rst) begin
      ar_ready <= 1'b0;
      r_valid  <= 1'b0;
      r_data   <= '0;
      aw_ready <= 1'b0;
      w_ready  <= 1'b0;
      b_valid  <= 1'b0;
      have_aw  <= 1'b0;
      have_w   <= 1'b0;
      rdelay   <= 0;
      stalls   <= 0;
      rq.delete();
    end else begin
      // read address
      if (ar_valid && ar_ready) rq.push_back(mem[ar_addr[IW+1:2]]);
      ar_ready <= ($urandom_range(99) >= STALL_PCT);
      if (ar_valid && !ar_ready) stalls <= stalls + 1;
      // read data, in order, random delay
      if (r_valid && r_ready) r_valid <= 1'b0;
      if ((!r_valid || r_ready) && rq.size() > 0) begin
        if (rdelay == 0) begin
          r_data  <= rq.pop_front();
          r_valid <= 1'b1;
          rdelay  <= $urandom_range(3);
        end else rdelay <= rdelay - 1;
      end
      // write
      if (aw_valid && aw_ready) begin have_aw <= 1'b1; aw_q <= aw_addr; end
      if (w_valid && w_ready)   begin have_w  <= 1'b1; w_q  <= w_data;  end
      aw_ready <= !have_aw && ($urandom_range(99) >= STALL_PCT);
      w_ready  <= !have_w  && ($urandom_range(99) >= STALL_PCT);
      if (have_aw && have_w && !b_valid) begin
        mem[aw_q[IW+1:2]] <= w_q;
        b_valid <= 1'b1;
        have_aw <= 1'b0;
        have_w  <= 1'b0;
      end
      if (b_valid && b_ready) b_valid <= 1'b0;
    end
  end
endmodule
