// tb_fleet_workloads: the evaluated workloads at their full PU count.
//
// The original design was evaluated with 180 PUs for each application.
// tb_fleet_full already runs 180 KNN PUs, which use the shell with 32-bit
// input tokens. This testbench covers the other shell width: it builds one
// 180-PU accelerator of Counter PUs and one of Time Series Prediction PUs
// (both take 8-bit tokens), runs one complete job on each with a short
// random stream, and checks every output token of every PU against the
// reference model. The Counter job is the long one: 180 x 512 output
// tokens go to memory, one write per token.
module tb_fleet_workloads;
  import fleet_pkg::*;
  localparam int NK = 2, N = 180;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int c [NK], f [NK], st [NK], ct [NK], ms [NK], bp [NK], nj [NK];
  logic fin [NK];

  fleet_job_harness #(.PU_KIND(PU_COUNTER), .NUM_PU(N), .JOBS(1), .DATA_WORDS(8)) h0 (.clk, .rst, .checks(c[0]), .failures(f[0]),
    .n_stall(st[0]), .n_contention(ct[0]), .n_mem_stall(ms[0]), .n_bypass(bp[0]), .n_jobs(nj[0]), .finished(fin[0]));
  fleet_job_harness #(.PU_KIND(PU_TSP),     .NUM_PU(N), .JOBS(1), .DATA_WORDS(8)) h1 (.clk, .rst, .checks(c[1]), .failures(f[1]),
    .n_stall(st[1]), .n_contention(ct[1]), .n_mem_stall(ms[1]), .n_bypass(bp[1]), .n_jobs(nj[1]), .finished(fin[1]));

  task automatic report_and_finish(int extra);
    int checks = 0, failures = extra;
    for (int k = 0; k < NK; k++) begin checks += c[k]; failures += f[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    int extra = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    wait (fin[0] && fin[1] && fin[0] && fin[3] && fin[1]);
    for (int k = 0; k < NK; k++) begin
      $display("harness %0d: %0d PUs, %0d checks, %0d failures", k, N, c[k], f[k]);
      if (nj[k] != 1) begin extra++; $display("FAIL: kind %0d did not finish its job", k); end
    end
    report_and_finish(extra);
  end
  initial begin
    repeat (1000000) @(posedge clk);
    $display("FAIL: watchdog");
    report_and_finish(1);
  end
endmodule
