// li_rx_fifo: receive buffer for one direction of the latency-insensitive
// PU IO interface.
//
// The ready wire of the PU IO interface crosses a register block, so the
// sender sees it LAT/2 cycles late and the data it sends back arrives another
// LAT/2 cycles later. Ready is therefore used as a grant: each cycle in which
// `grant` is high allows the sender exactly one beat, which arrives at most
// LAT cycles later. The buffer remembers the grants of the last LAT cycles
// and only grants again while every granted beat still has room, so it can
// never overflow however the sender uses its grants. With DEPTH >= LAT + 2
// it grants every cycle when the reader keeps up.
//
// Interface: wr_valid/wr_data from the far side, grant back to it (a
// register); rd_valid/rd_data/rd_ready toward the local consumer, first-word
// fall-through. rst is synchronous and clears the buffer and all grants;
// beats arriving during rst are dropped. `armed` has an initial value (as
// FPGA registers do) and only enables the overflow assertion after the first
// reset.
module li_rx_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 8,
  parameter int LAT   = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_valid,
  input  logic [W-1:0] wr_data,
  output logic         grant,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  input  logic         rd_ready
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  logic [W-1:0]   mem [DEPTH];
  logic [AW-1:0]  wptr, rptr;
  logic [CW-1:0]  count;
  logic [LAT-1:0] hist;      // grants issued in the last LAT cycles
  logic           do_wr, do_rd;
  int unsigned    pending;
  // Set by the first reset. Before it the buffer holds power-up values and
  // the overflow rule below does not apply yet.
  logic           armed = 1'b0;

  assign rd_valid = (count != 0);
  assign rd_data  = mem[rptr];
  assign do_rd    = rd_valid && rd_ready;
  assign do_wr    = wr_valid;

  always_comb begin
    pending = 32'(count) + 32'(do_wr) + 32'(grant);
    for (int i = 0; i < LAT; i++) pending += 32'(hist[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      armed <= 1'b1;
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      hist  <= '0;
      grant <= 1'b0;
    end else begin
      if (do_wr) begin
        mem[wptr] <= wr_data;
        wptr      <= (32'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      end
      if (do_rd) rptr <= (32'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
      hist  <= {hist[LAT-2:0], grant};
      grant <= (pending + 1 <= DEPTH);
    end
  end

  // A beat must never arrive at a full buffer.
  a_no_overflow : assert property (@(posedge clk) disable iff (rst || !armed)
    !(wr_valid && 32'(count) == DEPTH))
    else $error("li_rx_fifo overflow");

endmodule
