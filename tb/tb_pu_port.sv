// tb_pu_port: the PU-side interface logic behind a register block.
//
// A shell model sends numbered beats only in cycles where it sees a grant
// (using each grant with random probability); a core model reads them with
// random back-pressure. Checks: order, data and last flag of every beat, no
// buffer overflow (an assertion in the buffer), full rate when nothing
// stalls, and that grants were withheld at least once. In the other
// direction a core model sends numbered tokens and the shell model grants
// randomly; order and one-token-per-grant are checked. Reset is checked to
// reach the core and to stop grants.
module tb_pu_port;
  localparam int IN_W = 32;
  localparam int S2P_W = IN_W + 4, P2S_W = 10;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [S2P_W-1:0] shell_s2p, pu_s2p;
  logic [P2S_W-1:0] pu_p2s, shell_p2s;
  // shell model drive
  logic [IN_W-1:0] s_data = '0;
  logic s_valid = 1'b0, s_last = 1'b0, s_out_grant = 1'b0, s_pu_rst = 1'b1;
  // core side
  logic core_rst, c_in_valid, c_in_last, c_in_ready = 1'b0, c_out_valid = 1'b0, c_out_ready;
  logic [IN_W-1:0] c_in_data;
  logic [7:0] c_out_data = '0;

  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_withheld = 0, o_sent = 0, o_recv = 0;
  int total = 400;
  int p_use = 80, p_rd = 70;

  assign shell_s2p = {s_pu_rst, s_out_grant, s_last, s_valid, s_data};

  reg_block #(.S2P_W(S2P_W), .P2S_W(P2S_W)) u_regs (
    .clk, .rst, .shell_s2p, .pu_s2p, .pu_p2s, .shell_p2s);

  pu_port #(.IN_W(IN_W)) dut (
    .clk,
    .if_in_data(pu_s2p[IN_W-1:0]), .if_in_valid(pu_s2p[IN_W]), .if_in_last(pu_s2p[IN_W+1]),
    .if_out_ready(pu_s2p[IN_W+2]), .if_pu_rst(pu_s2p[IN_W+3]),
    .if_in_ready(pu_p2s[0]), .if_out_data(pu_p2s[8:1]), .if_out_valid(pu_p2s[9]),
    .core_rst, .core_in_valid(c_in_valid), .core_in_data(c_in_data), .core_in_last(c_in_last),
    .core_in_ready(c_in_ready), .core_out_valid(c_out_valid), .core_out_data(c_out_data),
    .core_out_ready(c_out_ready));

  // shell model: one beat per seen grant, at most
  always @(negedge clk) begin
    s_valid = 1'b0;
    if (!s_pu_rst && shell_p2s[0] && n_sent < total && $urandom_range(99) < p_use) begin
      s_valid = 1'b1;
      s_data  = 32'(n_sent) * 32'h9E37_79B9;
      s_last  = (n_sent == total - 1);
      n_sent++;
    end
    if (!s_pu_rst && !shell_p2s[0]) n_withheld++;
    s_out_grant = ($urandom_range(99) < 60);
    // output beats arriving at the shell
    if (shell_p2s[9]) begin
      checks++;
      if (shell_p2s[8:1] !== 8'(o_recv * 7)) begin
        failures++; $display("FAIL: out token %0d = %02h", o_recv, shell_p2s[8:1]);
      end
      o_recv++;
    end
  end

  // core model
  always @(negedge clk) begin
    c_in_ready = ($urandom_range(99) < p_rd);
    #4;
    if (!core_rst && c_in_valid && c_in_ready) begin
      checks++;
      if (c_in_data !== 32'(n_recv) * 32'h9E37_79B9 || c_in_last !== (n_recv == total - 1)) begin
        failures++; $display("FAIL: beat %0d data %h last %b", n_recv, c_in_data, c_in_last);
      end
      n_recv++;
    end
    if (!core_rst && c_out_valid && c_out_ready) o_sent++;
  end
  always @(negedge clk) begin
    if (core_rst) c_out_valid = 1'b0;
    else if (!c_out_valid || c_out_ready) begin  // previous token taken (sampled at +4)
      c_out_valid = (o_sent < 200) && ($urandom_range(1) == 1);
      c_out_data  = 8'(o_sent * 7);
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (8) @(negedge clk);
    checks++;
    if (!core_rst) begin failures++; $display("FAIL: reset bit did not reach the core"); end
    checks++;
    if (shell_p2s[0]) begin failures++; $display("FAIL: grant during reset"); end
    s_pu_rst = 1'b0;
    wait (n_recv == total);
    repeat (50) @(negedge clk);
    checks++;
    if (n_withheld == 0) begin failures++; $display("FAIL: grants never withheld"); end
    // full-rate phase: sender uses every grant, reader always ready
    s_pu_rst = 1'b1;
    repeat (8) @(negedge clk);
    s_pu_rst = 1'b0;
    p_use = 100; p_rd = 100; n_sent = 0; n_recv = 0;
    repeat (10) @(negedge clk);
    t0 = n_recv;
    repeat (200) @(negedge clk);
    t1 = n_recv;
    checks++;
    if (t1 - t0 < 190) begin failures++; $display("FAIL: rate %0d beats in 200 cycles", t1 - t0); end
    wait (n_recv == total);
    wait (o_sent >= 200);
    repeat (20) @(negedge clk);
    checks++;
    if (o_recv != o_sent) begin failures++; $display("FAIL: %0d tokens sent, %0d arrived", o_sent, o_recv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
