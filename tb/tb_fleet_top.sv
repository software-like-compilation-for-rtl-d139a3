// tb_fleet_top: end-to-end test of the accelerator with every PU kind.
//
// Five accelerators, one per PU kind, each with 5 PU slots, run two jobs
// each against their own memory model (random back-pressure), and every
// PU's output is compared with a reference model. The test also counts how
// often the design's mechanisms occurred and fails if one never did: the
// per-PU configuration phase followed by the data broadcast (every job),
// broadcast stalls on a busy PU, several PUs contending for the output
// port, memory back-pressure, the per-job PU reset (second jobs), and the
// Counter PU's read-modify-write bypass. A sixth accelerator (Counter PUs)
// is built with two extra register stages each way between the shell and
// the register blocks, so the longer grant window is exercised as well.
module tb_fleet_top;
  import fleet_pkg::*;
  localparam int NK = 6;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int c [NK], f [NK], st [NK], ct [NK], ms [NK], bp [NK], nj [NK];
  logic fin [NK];

  fleet_job_harness #(.PU_KIND(PU_SUMMER),  .NUM_PU(5)) h0 (.clk, .rst, .checks(c[0]), .failures(f[0]),
    .n_stall(st[0]), .n_contention(ct[0]), .n_mem_stall(ms[0]), .n_bypass(bp[0]), .n_jobs(nj[0]), .finished(fin[0]));
  fleet_job_harness #(.PU_KIND(PU_DOT),     .NUM_PU(5)) h1 (.clk, .rst, .checks(c[1]), .failures(f[1]),
    .n_stall(st[1]), .n_contention(ct[1]), .n_mem_stall(ms[1]), .n_bypass(bp[1]), .n_jobs(nj[1]), .finished(fin[1]));
  fleet_job_harness #(.PU_KIND(PU_COUNTER), .NUM_PU(5)) h2 (.clk, .rst, .checks(c[2]), .failures(f[2]),
    .n_stall(st[2]), .n_contention(ct[2]), .n_mem_stall(ms[2]), .n_bypass(bp[2]), .n_jobs(nj[2]), .finished(fin[2]));
  fleet_job_harness #(.PU_KIND(PU_KNN),     .NUM_PU(5)) h3 (.clk, .rst, .checks(c[3]), .failures(f[3]),
    .n_stall(st[3]), .n_contention(ct[3]), .n_mem_stall(ms[3]), .n_bypass(bp[3]), .n_jobs(nj[3]), .finished(fin[3]));
  fleet_job_harness #(.PU_KIND(PU_TSP),     .NUM_PU(5)) h4 (.clk, .rst, .checks(c[4]), .failures(f[4]),
    .n_stall(st[4]), .n_contention(ct[4]), .n_mem_stall(ms[4]), .n_bypass(bp[4]), .n_jobs(nj[4]), .finished(fin[4]));
  fleet_job_harness #(.PU_KIND(PU_COUNTER), .NUM_PU(5), .EXTRA_REGS(2)) h5 (.clk, .rst, .checks(c[5]), .failures(f[5]),
    .n_stall(st[5]), .n_contention(ct[5]), .n_mem_stall(ms[5]), .n_bypass(bp[5]), .n_jobs(nj[5]), .finished(fin[5]));

  task automatic report_and_finish(int extra);
    int checks = 0, failures = extra;
    for (int k = 0; k < NK; k++) begin checks += c[k]; failures += f[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    int tot_st = 0, tot_ct = 0, tot_ms = 0, extra = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    for (int k = 0; k < NK; k++) begin
      tot_st += st[k]; tot_ct += ct[k]; tot_ms += ms[k];
      $display("harness %0d: failures %0d, jobs %0d, broadcast stalls %0d, output contention %0d, memory stalls %0d",
               k, f[k], nj[k], st[k], ct[k], ms[k]);
      if (nj[k] < 2) begin extra++; $display("FAIL: harness %0d ran no second job (PU reset)", k); end
    end
    $display("counter bypass uses %0d", bp[2]);
    if (tot_st == 0) begin extra++; $display("FAIL: no broadcast stall"); end
    if (tot_ct == 0) begin extra++; $display("FAIL: no output contention"); end
    if (tot_ms == 0) begin extra++; $display("FAIL: no memory back-pressure"); end
    if (bp[2] == 0)  begin extra++; $display("FAIL: counter bypass never used"); end
    report_and_finish(extra);
  end
  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL: watchdog");
    report_and_finish(1);
  end
endmodule
