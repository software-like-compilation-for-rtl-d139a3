// fleet_job_harness: drives one fleet_top instance of a given PU kind
// through JOBS complete jobs and checks every PU's output in memory.
//
// For each job it writes random configuration words (one set per PU) and
// a random shared data stream into a memory model, pulses start, waits for
// done and compares each PU's output region with the reference model of
// tb_ref_pkg. Jobs after the first also check that the per-job PU reset
// clears the previous job's state. It counts how often the design's
// mechanisms happened: broadcast stalls, output-port contention, memory
// back-pressure, and (Counter PUs) the read-modify-write bypass.
module fleet_job_harness
  import fleet_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter pu_kind_e PU_KIND = PU_SUMMER,
  parameter int NUM_PU = 4,
  parameter int JOBS = 2,
  parameter int DATA_WORDS = 16,
  parameter int EXTRA_REGS = 0
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_contention,
  output int   n_mem_stall,
  output int   n_bypass,
  output int   n_jobs,
  output logic finished
);
  localparam int ADDR_W = 64;
  localparam int CFG_W = 0, DATA_W = 4096, OUT_W_ = 8192;   // word offsets
  localparam int CFGW = cfg_words(PU_KIND);
  localparam int OL = out_len(PU_KIND);

  logic start = 1'b0, busy, done, bcast_stall, out_contention;
  logic [31:0] data_words = '0;
  logic [ADDR_W-1:0] ar_addr, aw_addr;
  logic ar_valid, ar_ready, r_valid, r_ready, aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready;
  logic [31:0] r_data, w_data;
  logic [3:0] w_strb;

  fleet_top #(.PU_KIND(PU_KIND), .NUM_PU(NUM_PU), .ADDR_W(ADDR_W), .EXTRA_REGS(EXTRA_REGS)) dut (
    .clk, .rst, .start, .cfg_base(ADDR_W'(CFG_W * 4)), .data_base(ADDR_W'(DATA_W * 4)),
    .data_words, .out_base(ADDR_W'(OUT_W_ * 4)), .busy, .done, .bcast_stall, .out_contention,
    .m_ar_addr(ar_addr), .m_ar_valid(ar_valid), .m_ar_ready(ar_ready), .m_r_data(r_data),
    .m_r_valid(r_valid), .m_r_ready(r_ready), .m_aw_addr(aw_addr), .m_aw_valid(aw_valid),
    .m_aw_ready(aw_ready), .m_w_data(w_data), .m_w_strb(w_strb), .m_w_valid(w_valid),
    .m_w_ready(w_ready), .m_b_valid(b_valid), .m_b_ready(b_ready));

  axi_mem_model #(.ADDR_W(ADDR_W), .WORDS(1 << 17)) u_mem (
    .clk, .rst, .ar_addr, .ar_valid, .ar_ready, .r_data, .r_valid, .r_ready,
    .aw_addr, .aw_valid, .aw_ready, .w_data, .w_strb, .w_valid, .w_ready, .b_valid, .b_ready);

  always @(posedge clk) begin
    if (bcast_stall) n_stall++;
    if (out_contention) n_contention++;
    if ((ar_valid && !ar_ready) || (aw_valid && !aw_ready)) n_mem_stall++;
  end
  if (PU_KIND == PU_COUNTER) begin : g_byp
    always @(posedge clk) if (dut.g_slot[0].u_slot.bypass_event) n_bypass++;
  end

  function automatic word_q_t gen_data(int job);
    word_q_t d;
    int n = DATA_WORDS + job;
    if (PU_KIND == PU_KNN) n = KNN_DIM * (DATA_WORDS / KNN_DIM + job);
    if (PU_KIND == PU_DOT) n = 2 * ((DATA_WORDS + job) / 2);
    for (int i = 0; i < n; i++) begin
      case (PU_KIND)
        PU_KNN:     d.push_back(32'(16'($urandom_range(200)) - 16'd100));
        PU_COUNTER: d.push_back((i % 3 == 0) ? 32'h0707_0707 : ($urandom() & 32'h0F0F_0F0F));
        default:    d.push_back($urandom());
      endcase
    end
    return d;
  endfunction

  function automatic byte_q_t reference(word_q_t c, word_q_t d);
    case (PU_KIND)
      PU_SUMMER:  return ref_summer(c, d);
      PU_DOT:     return ref_dot(c, d);
      PU_COUNTER: return ref_counter(c, d);
      PU_TSP:     return ref_tsp(c, d, TSP_K);
      default:    return ref_knn(c, d, KNN_DIM, KNN_K);
    endcase
  endfunction

  initial begin
    word_q_t cfg, data;
    checks = 0; failures = 0; n_stall = 0; n_contention = 0; n_mem_stall = 0;
    n_bypass = 0; n_jobs = 0; finished = 1'b0;
    wait (!rst);
    for (int job = 0; job < JOBS; job++) begin
      cfg.delete();
      for (int i = 0; i < NUM_PU * CFGW; i++) begin
        logic [31:0] v;
        v = (PU_KIND == PU_KNN) ? 32'(16'($urandom_range(200)) - 16'd100) : $urandom();
        u_mem.mem[CFG_W + i] = v;
        cfg.push_back(v);
      end
      data = gen_data(job);
      foreach (data[i]) u_mem.mem[DATA_W + i] = data[i];
      for (int i = 0; i < NUM_PU * OL; i++) u_mem.mem[OUT_W_ + i] = 32'hDEAD_BEEF;
      @(negedge clk); data_words = data.size(); start = 1'b1;
      @(negedge clk); start = 1'b0;
      checks++;
      if (!busy) begin failures++; $display("FAIL: kind %0d not busy after start", PU_KIND); end
      wait (done);
      n_jobs++;
      for (int p = 0; p < NUM_PU; p++) begin
        word_q_t c;
        byte_q_t e;
        c.delete();
        for (int w = 0; w < CFGW; w++) c.push_back(cfg[p * CFGW + w]);
        e = reference(c, data);
        foreach (e[j]) begin
          checks++;
          if (u_mem.mem[OUT_W_ + p * OL + j] !== {24'h0, e[j]}) begin
            failures++;
            if (failures < 10)
              $display("FAIL: kind %0d job %0d PU %0d token %0d = %h, expected %h", PU_KIND, job, p, j,
                       u_mem.mem[OUT_W_ + p * OL + j], e[j]);
          end
        end
      end
      repeat (5) @(negedge clk);
    end
    finished = 1'b1;
  end
endmodule
