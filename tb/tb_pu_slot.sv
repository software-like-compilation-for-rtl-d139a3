// tb_pu_slot: one PU slot of the default kind (KNN), driven directly on its
// interface bits by a shell model that sends a beat only when it sees the
// slot's in_ready grant and grants out_ready randomly. Checks the
// configuration/data/last framing through the slot, the PU result against
// the reference model, one output token per grant, and that the reset bit
// restarts the PU for a second job.
module tb_pu_slot;
  import fleet_pkg::*;
  import tb_ref_pkg::*;
  localparam pu_kind_e KIND = PU_KNN;
  localparam int IN_W = in_width(KIND), S2P_W = s2p_width(KIND);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [IN_W-1:0] d = '0;
  logic v = 1'b0, l = 1'b0, og = 1'b0, pr = 1'b1;
  logic [S2P_W-1:0] s2p;
  logic [P2S_W-1:0] p2s;
  int checks = 0, failures = 0, extra_beats = 0;
  byte_q_t got;

  assign s2p = {pr, og, l, v, d};
  pu_slot dut (.clk, .s2p, .p2s);

  always @(negedge clk) begin
    if (p2s[9]) begin
      got.push_back(p2s[8:1]);
      if (!og) extra_beats++;   // og still holds the grant of this cycle
    end
    og = ($urandom_range(99) < 50);
  end

  task automatic job(word_q_t cfg, word_q_t data);
    word_q_t toks;
    byte_q_t exp;
    int i = 0;
    toks = cfg;
    foreach (data[k]) toks.push_back(data[k]);
    exp = ref_knn(cfg, data, KNN_DIM, KNN_K);
    @(negedge clk); pr = 1'b1;
    repeat (4) @(negedge clk);
    pr = 1'b0;
    got.delete();
    while (i < toks.size()) begin
      @(negedge clk);
      v = 1'b0;
      if (p2s[0] && $urandom_range(99) < 80) begin
        v = 1'b1; d = toks[i]; l = (i == toks.size() - 1); i++;
      end
    end
    @(negedge clk); v = 1'b0; l = 1'b0;
    repeat (200) @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("FAIL: %0d tokens", got.size()); end
    foreach (exp[k]) if (k < got.size()) begin
      checks++;
      if (got[k] !== exp[k]) begin failures++; $display("FAIL: token %0d %h vs %h", k, got[k], exp[k]); end
    end
  endtask

  initial begin
    word_q_t cfg, data;
    for (int j = 0; j < 3; j++) begin
      cfg.delete(); data.delete();
      for (int e = 0; e < KNN_DIM; e++) cfg.push_back(32'($urandom_range(100)));
      for (int k = 0; k < KNN_DIM * (5 + j); k++) data.push_back(32'($urandom_range(100)));
      job(cfg, data);
    end
    checks++;
    if (extra_beats != 0) begin failures++; $display("FAIL: token without grant"); end
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
