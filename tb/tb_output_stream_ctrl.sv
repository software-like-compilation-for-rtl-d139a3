// tb_output_stream_ctrl: output stream controller with 3 PUs and 5 output
// tokens each. PU models send numbered tokens through a 2-cycle delay in
// each direction (as a register block adds), using each seen grant with
// random probability; the memory model stalls randomly. Checks: every
// token lands at word (pu * OUT_LEN + j) after out_base, done rises only at
// the end, PUs contended for the write port at least once, and `clear`
// starts a new job.
module tb_output_stream_ctrl;
  localparam int NUM_PU = 3, OUT_LEN = 5, ADDR_W = 64;
  localparam logic [ADDR_W-1:0] OUT_BASE = 64'h400;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  always #5 clk = ~clk;

  logic out_done, contention;
  logic [NUM_PU-1:0] pu_valid, pu_grant;
  logic [7:0] pu_data [NUM_PU];
  logic [ADDR_W-1:0] aw_addr;
  logic aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready, ar_ready, r_valid;
  logic [31:0] w_data, r_data;
  logic [3:0] w_strb;
  // 2-cycle delays on both directions
  logic [NUM_PU-1:0] g_d1, g_d2, v_src, v_d1;
  logic [7:0] d_src [NUM_PU], d_d1 [NUM_PU];
  int sent [NUM_PU];
  int checks = 0, failures = 0, n_cont = 0;
  int seed = 0;

  output_stream_ctrl #(.NUM_PU(NUM_PU), .OUT_LEN(OUT_LEN), .ADDR_W(ADDR_W)) dut (
    .clk, .rst, .clear, .out_base(OUT_BASE), .out_done, .contention,
    .pu_valid, .pu_data, .pu_grant, .aw_addr, .aw_valid, .aw_ready, .w_data, .w_strb,
    .w_valid, .w_ready, .b_valid, .b_ready);

  axi_mem_model #(.ADDR_W(ADDR_W), .WORDS(4096)) u_mem (
    .clk, .rst, .ar_addr('0), .ar_valid(1'b0), .ar_ready, .r_data, .r_valid, .r_ready(1'b1),
    .aw_addr, .aw_valid, .aw_ready, .w_data, .w_strb, .w_valid, .w_ready, .b_valid, .b_ready);

  always_ff @(posedge clk) begin
    g_d1 <= rst ? '0 : pu_grant;
    g_d2 <= rst ? '0 : g_d1;
    v_d1 <= rst ? '0 : v_src;
    pu_valid <= rst ? '0 : v_d1;
    d_d1 <= d_src;
    pu_data <= d_d1;
  end

  always @(negedge clk) begin
    if (contention) n_cont++;
    for (int i = 0; i < NUM_PU; i++) begin
      v_src[i] = 1'b0;
      if (!clear && g_d2[i] && sent[i] < OUT_LEN && $urandom_range(99) < 70) begin
        v_src[i] = 1'b1;
        d_src[i] = 8'(seed + 16 * i + sent[i]);
        sent[i]++;
      end
    end
  end

  task automatic job(int s);
    @(negedge clk); clear = 1'b1;
    seed = s;
    for (int i = 0; i < NUM_PU; i++) sent[i] = OUT_LEN;   // hold the senders
    repeat (10) @(negedge clk);
    clear = 1'b0;
    checks++;
    if (out_done) begin failures++; $display("FAIL: done before any output"); end
    for (int i = 0; i < NUM_PU; i++) sent[i] = 0;
    wait (out_done);
    repeat (5) @(negedge clk);
    for (int i = 0; i < NUM_PU; i++)
      for (int j = 0; j < OUT_LEN; j++) begin
        checks++;
        if (u_mem.mem[256 + i * OUT_LEN + j] !== 32'((s + 16 * i + j) & 255)) begin
          failures++; $display("FAIL: PU %0d token %0d = %h", i, j, u_mem.mem[256 + i * OUT_LEN + j]);
        end
      end
  endtask

  initial begin
    for (int i = 0; i < NUM_PU; i++) sent[i] = OUT_LEN;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    job(3);
    job(100);
    checks++;
    if (n_cont == 0) begin failures++; $display("FAIL: no contention seen"); end
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
