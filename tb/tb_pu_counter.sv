// tb_pu_counter: self-checking testbench for pu_counter.
//
// Runs several jobs on the PU: a reset, its configuration tokens and a
// random data stream, with random gaps on the input and random output
// back-pressure. The output tokens are compared with tb_ref_pkg's
// reference model. Runs of equal input words exercise the read-modify-write bypass, which must be used at least once.
module tb_pu_counter;
  import tb_ref_pkg::*;
  localparam int IN_W = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic            in_valid = 1'b0, in_last = 1'b0, in_ready;
  logic [IN_W-1:0] in_data = '0;
  logic            out_valid, out_ready = 1'b0;
  logic [7:0]      out_data;
  int checks = 0, failures = 0;
  byte_q_t got;
  logic bypass_used;
  int   n_bypass = 0;

  pu_counter dut (
    .clk, .rst, .in_valid, .in_data, .in_last, .in_ready,
    .out_valid, .out_data, .out_ready, .bypass_used
  );

  always @(negedge clk) begin
    out_ready = ($urandom_range(3) != 0);
    #4;
    if (!rst && out_valid && out_ready) got.push_back(out_data);
  end
  always @(posedge clk) if (bypass_used) n_bypass++;

  task automatic drive(word_q_t toks);
    int i = 0;
    while (i < toks.size()) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_data  = IN_W'(toks[i]);
      in_last  = (i == toks.size() - 1);
      #4;
      if (in_valid && in_ready) i++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  task automatic run_job(word_q_t cfg, word_q_t data);
    byte_q_t exp;
    word_q_t toks, dt;
    int wait_cycles = 0;
    exp = ref_counter(cfg, data);
    toks = to_tokens(cfg, IN_W);
    dt   = to_tokens(data, IN_W);
    foreach (dt[i]) toks.push_back(dt[i]);
    got.delete();
    @(negedge clk); rst = 1'b1;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    drive(toks);
    while (got.size() < exp.size() && wait_cycles < 20000) begin
      @(negedge clk);
      wait_cycles++;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL: %0d output tokens, expected %0d", got.size(), exp.size());
    end
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: token %0d = %02h, expected %02h", i, got[i], exp[i]);
      end
    end
  endtask

  initial begin
    word_q_t cfg, data;
    for (int job = 0; job < 3; job++) begin
      cfg.delete();
      data.delete();
      cfg.push_back($urandom());
      for (int i = 0; i < 1 + $urandom_range(30); i++)
        data.push_back((job == 1) ? 32'h0505_0505 : ($urandom() & 32'h0303_0303));
      run_job(cfg, data);
    end
    checks++;
    if (n_bypass == 0) begin
      failures++;
      $display("FAIL: bypass never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
