// tb_reg_block: checks that every bit crosses the register block in exactly
// two cycles in both directions, and that reset clears both columns.
module tb_reg_block;
  localparam int S2P_W = 36, P2S_W = 10;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [S2P_W-1:0] shell_s2p = '0, pu_s2p;
  logic [P2S_W-1:0] pu_p2s = '0, shell_p2s;
  logic [S2P_W-1:0] hs [3];
  logic [P2S_W-1:0] hp [3];
  int checks = 0, failures = 0;

  reg_block #(.S2P_W(S2P_W), .P2S_W(P2S_W)) dut (.*);

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (pu_s2p !== '0 || shell_p2s !== '0) begin failures++; $display("FAIL: not cleared by reset"); end
    rst = 1'b0;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      // values driven 2 cycles ago must be visible now
      if (c >= 2) begin
        checks += 2;
        if (pu_s2p !== hs[1])    begin failures++; $display("FAIL: s2p cycle %0d", c); end
        if (shell_p2s !== hp[1]) begin failures++; $display("FAIL: p2s cycle %0d", c); end
      end
      hs[1] = hs[0]; hp[1] = hp[0];
      shell_s2p = {$urandom(), $urandom()};
      pu_p2s    = P2S_W'($urandom());
      hs[0] = shell_s2p; hp[0] = pu_p2s;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
