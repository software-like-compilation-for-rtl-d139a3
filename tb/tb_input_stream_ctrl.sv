// tb_input_stream_ctrl: input stream controller with 3 PUs, 8-bit tokens
// and 2 configuration words per PU, reading from a memory model with random
// back-pressure. Each PU model grants randomly (and is modelled with zero
// interface latency). Checks: the reset phase length, each PU's token
// sequence (its own configuration tokens, then every data token, the last
// one flagged), that data tokens go to all PUs in the same cycle, that the
// broadcast stalled at least once, and that a second job works.
module tb_input_stream_ctrl;
  import tb_ref_pkg::*;
  localparam int NUM_PU = 3, IN_W = 8, CFG_WORDS = 2, ADDR_W = 64;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, pu_rst, in_done, bcast_stall;
  logic [31:0] data_words = '0;
  logic [ADDR_W-1:0] ar_addr, aw_addr = '0;
  logic ar_valid, ar_ready, r_valid, r_ready, aw_ready, w_ready, b_valid;
  logic [31:0] r_data;
  logic [NUM_PU-1:0] pu_grant = '0, pu_valid;
  logic [IN_W-1:0] tok_data;
  logic tok_last;
  int checks = 0, failures = 0, n_stall = 0, n_rst = 0;
  word_q_t got [NUM_PU];
  int last_pos [NUM_PU];

  input_stream_ctrl #(.NUM_PU(NUM_PU), .IN_W(IN_W), .CFG_WORDS(CFG_WORDS), .ADDR_W(ADDR_W)) dut (
    .clk, .rst, .start, .cfg_base(64'h100), .data_base(64'h1000), .data_words, .busy, .pu_rst,
    .in_done, .bcast_stall, .ar_addr, .ar_valid, .ar_ready, .r_data, .r_valid, .r_ready,
    .pu_grant, .pu_valid, .tok_data, .tok_last);

  axi_mem_model #(.ADDR_W(ADDR_W), .WORDS(4096)) u_mem (
    .clk, .rst, .ar_addr, .ar_valid, .ar_ready, .r_data, .r_valid, .r_ready,
    .aw_addr, .aw_valid(1'b0), .aw_ready, .w_data(32'h0), .w_strb(4'h0), .w_valid(1'b0), .w_ready,
    .b_valid, .b_ready(1'b1));

  always @(negedge clk) begin
    for (int i = 0; i < NUM_PU; i++) pu_grant[i] = ($urandom_range(99) < 75);
    #4;
    if (pu_rst) n_rst++;
    if (bcast_stall) n_stall++;
    for (int i = 0; i < NUM_PU; i++)
      if (pu_valid[i]) begin
        got[i].push_back(32'(tok_data));
        if (tok_last) last_pos[i] = got[i].size() - 1;
        if (!pu_grant[i]) begin failures++; $display("FAIL: beat without grant"); end
      end
    if (dut.state == 3'd3 && pu_valid != '0 && pu_valid != '1) begin
      failures++; $display("FAIL: data token not broadcast");
    end
  end

  task automatic job(int nwords);
    word_q_t cfg, data, exp;
    for (int i = 0; i < NUM_PU * CFG_WORDS; i++) begin
      u_mem.mem[64 + i] = $urandom(); cfg.push_back(u_mem.mem[64 + i]);
    end
    for (int i = 0; i < nwords; i++) begin
      u_mem.mem[1024 + i] = $urandom(); data.push_back(u_mem.mem[1024 + i]);
    end
    for (int i = 0; i < NUM_PU; i++) begin got[i].delete(); last_pos[i] = -1; end
    n_rst = 0;
    @(negedge clk); data_words = nwords; start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (in_done);
    repeat (5) @(negedge clk);
    checks++;
    if (n_rst != 12) begin failures++; $display("FAIL: reset phase %0d cycles", n_rst); end
    for (int p = 0; p < NUM_PU; p++) begin
      word_q_t c;
      for (int w = 0; w < CFG_WORDS; w++) c.push_back(cfg[p * CFG_WORDS + w]);
      exp = to_tokens(c, IN_W);
      begin
        word_q_t d = to_tokens(data, IN_W);
        foreach (d[i]) exp.push_back(d[i]);
      end
      checks++;
      if (got[p].size() != exp.size()) begin
        failures++; $display("FAIL: PU %0d got %0d tokens, expected %0d", p, got[p].size(), exp.size());
      end
      foreach (exp[i]) if (i < got[p].size()) begin
        checks++;
        if (got[p][i] !== exp[i]) begin failures++; $display("FAIL: PU %0d token %0d", p, i); end
      end
      checks++;
      if (last_pos[p] != exp.size() - 1) begin failures++; $display("FAIL: PU %0d last at %0d", p, last_pos[p]); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    job(9);
    job(1);
    job(20);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: broadcast never stalled"); end
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
