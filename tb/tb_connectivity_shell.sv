// tb_connectivity_shell: the shell alone, for the Summer PU kind with 3
// slots, connected to behavioural PU models (no register blocks) and a
// memory model. Each PU model grants input randomly, adds every beat it
// receives and, after the last one, sends the 4-byte sum whenever it sees
// an out_ready grant. Checks: the results in memory, busy/done, and a
// second job.
module tb_connectivity_shell;
  import fleet_pkg::*;
  import tb_ref_pkg::*;
  localparam pu_kind_e KIND = PU_SUMMER;
  localparam int NUM_PU = 3, ADDR_W = 64, S2P_W = s2p_width(KIND), IN_W = in_width(KIND);
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done, bcast_stall, out_contention;
  logic [31:0] data_words = '0;
  logic [ADDR_W-1:0] ar_addr, aw_addr;
  logic ar_valid, ar_ready, r_valid, r_ready, aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready;
  logic [31:0] r_data, w_data;
  logic [3:0] w_strb;
  logic [S2P_W-1:0] s2p [NUM_PU];
  logic [P2S_W-1:0] p2s [NUM_PU];
  logic [31:0] sum [NUM_PU];
  int nout [NUM_PU];
  logic fin [NUM_PU];
  logic [NUM_PU-1:0] gin;
  int checks = 0, failures = 0;

  connectivity_shell #(.PU_KIND(KIND), .NUM_PU(NUM_PU), .ADDR_W(ADDR_W)) dut (
    .clk, .rst, .start, .cfg_base(64'h0), .data_base(64'h1000), .data_words, .out_base(64'h2000),
    .busy, .done, .bcast_stall, .out_contention,
    .ar_addr, .ar_valid, .ar_ready, .r_data, .r_valid, .r_ready,
    .aw_addr, .aw_valid, .aw_ready, .w_data, .w_strb, .w_valid, .w_ready, .b_valid, .b_ready,
    .s2p, .p2s);

  axi_mem_model #(.ADDR_W(ADDR_W), .WORDS(8192)) u_mem (
    .clk, .rst, .ar_addr, .ar_valid, .ar_ready, .r_data, .r_valid, .r_ready,
    .aw_addr, .aw_valid, .aw_ready, .w_data, .w_strb, .w_valid, .w_ready, .b_valid, .b_ready);

  // PU models: outputs change at the negedge, inputs sampled just before the posedge
  always @(negedge clk) begin
    for (int i = 0; i < NUM_PU; i++) begin
      gin[i] = ($urandom_range(99) < 70);
      p2s[i][0] = gin[i];
      p2s[i][9] = fin[i] && s2p[i][IN_W+2] && nout[i] < 4;   // one token per seen grant
      p2s[i][8:1] = 8'(sum[i] >> (8 * nout[i]));
      if (p2s[i][9]) nout[i]++;
    end
    #4;
    for (int i = 0; i < NUM_PU; i++) begin
      if (s2p[i][IN_W+3]) begin
        sum[i] = 0; nout[i] = 0; fin[i] = 1'b0;
      end else if (s2p[i][IN_W] && gin[i]) begin
        sum[i] += s2p[i][IN_W-1:0];
        if (s2p[i][IN_W+1]) fin[i] = 1'b1;
      end
    end
  end

  task automatic job(int n);
    word_q_t d;
    for (int i = 0; i < NUM_PU; i++) u_mem.mem[i] = $urandom();
    for (int i = 0; i < n; i++) begin u_mem.mem[1024 + i] = $urandom(); d.push_back(u_mem.mem[1024 + i]); end
    @(negedge clk); data_words = n; start = 1'b1;
    @(negedge clk); start = 1'b0;
    checks++;
    if (!busy || done) begin failures++; $display("FAIL: busy/done after start"); end
    wait (done);
    for (int p = 0; p < NUM_PU; p++) begin
      word_q_t c;
      byte_q_t e;
      c.push_back(u_mem.mem[p]);
      e = ref_summer(c, d);
      foreach (e[j]) begin
        checks++;
        if (u_mem.mem[2048 + 4 * p + j] !== {24'h0, e[j]}) begin
          failures++; $display("FAIL: PU %0d byte %0d", p, j);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    job(10);
    job(3);
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
