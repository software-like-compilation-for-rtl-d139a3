// tb_fleet_full: one complete job on the accelerator at its default size:
// 180 KNN PUs, each given its own query vector, all searching the same
// stream of 16 four-element vectors for their 3 nearest neighbours. Every
// PU's result is compared with the reference model. The number of cycles
// from start to done is reported and checked against a bound derived from
// the design: configuration (720 words), the stream, and the output writes
// (1080 tokens), each at a few cycles per word.
module tb_fleet_full;
  import fleet_pkg::*;
  import tb_ref_pkg::*;
  localparam int NUM_PU = 180, NVEC = 16;
  localparam int CFGW = cfg_words(PU_KNN), OL = out_len(PU_KNN);
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done, bcast_stall, out_contention;
  logic [31:0] data_words = '0;
  logic [63:0] ar_addr, aw_addr;
  logic ar_valid, ar_ready, r_valid, r_ready, aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready;
  logic [31:0] r_data, w_data;
  logic [3:0] w_strb;
  int checks = 0, failures = 0;

  fleet_top dut (
    .clk, .rst, .start, .cfg_base(64'h0), .data_base(64'h4000), .data_words, .out_base(64'h8000),
    .busy, .done, .bcast_stall, .out_contention,
    .m_ar_addr(ar_addr), .m_ar_valid(ar_valid), .m_ar_ready(ar_ready), .m_r_data(r_data),
    .m_r_valid(r_valid), .m_r_ready(r_ready), .m_aw_addr(aw_addr), .m_aw_valid(aw_valid),
    .m_aw_ready(aw_ready), .m_w_data(w_data), .m_w_strb(w_strb), .m_w_valid(w_valid),
    .m_w_ready(w_ready), .m_b_valid(b_valid), .m_b_ready(b_ready));

  axi_mem_model #(.ADDR_W(64), .WORDS(16384), .STALL_PCT(10)) u_mem (
    .clk, .rst, .ar_addr, .ar_valid, .ar_ready, .r_data, .r_valid, .r_ready,
    .aw_addr, .aw_valid, .aw_ready, .w_data, .w_strb, .w_valid, .w_ready, .b_valid, .b_ready);

  initial begin
    word_q_t cfg, data;
    int cycles, bound;
    cycles = 0;
    for (int i = 0; i < NUM_PU * CFGW; i++) begin
      logic [31:0] v;
      v = 32'(16'($urandom_range(400)) - 16'd200);
      u_mem.mem[i] = v;
      cfg.push_back(v);
    end
    for (int i = 0; i < NVEC * KNN_DIM; i++) begin
      logic [31:0] v;
      v = 32'(16'($urandom_range(400)) - 16'd200);
      u_mem.mem[4096 + i] = v;
      data.push_back(v);
    end
    repeat (4) @(negedge clk);
    rst = 1'b0;
    @(negedge clk); data_words = NVEC * KNN_DIM; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) begin @(negedge clk); cycles++; end
    $display("job of %0d PUs took %0d cycles", NUM_PU, cycles);
    bound = 12 + 10 * (NUM_PU * CFGW + NVEC * KNN_DIM) + 10 * NUM_PU * OL;
    checks++;
    if (cycles > bound) begin failures++; $display("FAIL: %0d cycles, bound %0d", cycles, bound); end
    for (int p = 0; p < NUM_PU; p++) begin
      word_q_t c;
      byte_q_t e;
      c.delete();
      for (int w = 0; w < CFGW; w++) c.push_back(cfg[p * CFGW + w]);
      e = ref_knn(c, data, KNN_DIM, KNN_K);
      foreach (e[j]) begin
        checks++;
        if (u_mem.mem[8192 + p * OL + j] !== {24'h0, e[j]}) begin
          failures++;
          if (failures < 10) $display("FAIL: PU %0d token %0d", p, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
