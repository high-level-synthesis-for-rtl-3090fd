// tb_sfir_top -- end-to-end test of both filter architectures at their
// default sizes (16 taps, 16-bit samples, 13-bit coefficients, 32-bit out).
//
// One sample stream drives both filters. Each output is compared every
// cycle with a 64-bit reference FIR at its own latency (1 cycle for the
// ASIC architecture, TAPS/2+1 for the FPGA one), and the two outputs are
// compared with each other after aligning the latencies. The run covers:
//   - symmetric pre-adding with both pair samples at full scale,
//   - results that wrap at 32 bits,
//   - stalls (en low) in the middle of a stream,
//   - a non-zero partial sum entering the FPGA chain on cas_in,
//   - a reset in the middle of a stream.
// Each of these is counted; one that never happened counts as a failure.
module tb_sfir_top;
  localparam int TAPS = sfir_pkg::TAPS, NH = TAPS / 2;
  localparam int DATA_W = sfir_pkg::DATA_W, COEF_W = sfir_pkg::COEF_W;
  localparam int OUT_W = sfir_pkg::OUT_W;

  logic clk = 0, rst = 1, en = 0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic [NH-1:0][COEF_W-1:0] coef = '0;
  logic signed [OUT_W-1:0] cas_in = '0;
  logic signed [OUT_W-1:0] y_asic, y_fpga;

  longint xs[$], cs[$];
  logic signed [OUT_W-1:0] asic_hist[$];   // y_asic after each enabled edge
  int checks = 0, failures = 0;
  int n_stall = 0, n_cascade = 0, n_wrap = 0, n_reset = 0, n_fullscale = 0, n_match = 0;

  sfir_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint hfull(int i);
    int k = (i < NH) ? i : TAPS - 1 - i;
    return longint'($signed(coef[k]));
  endfunction

  function automatic longint xat(int n);
    return (n >= 0 && n < xs.size()) ? xs[n] : 0;
  endfunction

  function automatic longint fir(int n);
    longint s = 0;
    for (int i = 0; i < TAPS; i++) s += hfull(i) * xat(n - i);
    return s;
  endfunction

  task automatic check(logic signed [OUT_W-1:0] got, logic signed [OUT_W-1:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d at %0t", what, got, want, $time);
    end
  endtask

  task automatic do_reset();
    rst = 1; en = 0;
    @(posedge clk); #1 rst = 0;
    xs.delete(); cs.delete(); asic_hist.delete();
    n_reset++;
  endtask

  task automatic step(logic e, logic signed [DATA_W-1:0] x, logic signed [OUT_W-1:0] c);
    int n;
    longint f;
    en = e; x_in = x; cas_in = c;
    @(posedge clk);
    if (e) begin
      xs.push_back(longint'(x));
      cs.push_back(longint'(c));
      if (c != 0) n_cascade++;
    end else n_stall++;
    #1;
    n = xs.size() - 1;
    f = fir(n);
    if (f != longint'(OUT_W'(f))) n_wrap++;
    for (int k = 0; k < NH; k++)
      if (xat(n - k) + xat(n - TAPS + 1 + k) < -32768 || xat(n - k) + xat(n - TAPS + 1 + k) > 32767)
        n_fullscale++;
    check(y_asic, OUT_W'(f), "asic");
    check(y_fpga, OUT_W'(fir(n - NH) + ((n - NH + 1 >= 0) ? cs[n - NH + 1] : 0)), "fpga");
    if (e) asic_hist.push_back(y_asic);
    // architectures agree (compare only where cas_in contributed nothing)
    if (e && n >= NH && cs[n - NH + 1] == 0) begin
      checks++;
      if (y_fpga !== asic_hist[n - NH]) failures++;
      else n_match++;
    end
  endtask

  task automatic run_stream(int len, int stall_pct, bit with_cas, bit full_scale);
    logic signed [DATA_W-1:0] x;
    for (int c = 0; c < len; c++) begin
      x = full_scale ? (($urandom_range(0, 1) != 0) ? DATA_W'(32767) : DATA_W'(-32768))
                     : DATA_W'($urandom);
      step(($urandom_range(0, 99) >= stall_pct), x,
           (with_cas && ($urandom_range(0, 3) == 0)) ? OUT_W'($urandom) : OUT_W'(0));
    end
  endtask

  initial begin
    // 1: random coefficients, random samples, no stalls
    for (int k = 0; k < NH; k++) coef[k] = COEF_W'($urandom);
    do_reset();
    check(y_asic, 0, "reset asic");
    check(y_fpga, 0, "reset fpga");
    run_stream(400, 0, 0, 0);
    // 2: stalls in the middle of the stream
    run_stream(400, 30, 0, 0);
    // 3: reset mid-stream, then full-scale samples with extreme coefficients
    for (int k = 0; k < NH; k++) coef[k] = (k % 2 != 0) ? COEF_W'(4095) : COEF_W'(-4096);
    do_reset();
    run_stream(300, 10, 0, 1);
    // 4: all-minimum case: sum is exactly 2^31 and wraps
    for (int k = 0; k < NH; k++) coef[k] = COEF_W'(-4096);
    do_reset();
    for (int c = 0; c < TAPS + NH + 2; c++) step(1, DATA_W'(-32768), 0);
    check(y_asic, {1'b1, {(OUT_W-1){1'b0}}}, "asic wrap to -2^31");
    check(y_fpga, {1'b1, {(OUT_W-1){1'b0}}}, "fpga wrap to -2^31");
    // 5: cascade input in use
    for (int k = 0; k < NH; k++) coef[k] = COEF_W'($urandom);
    do_reset();
    run_stream(400, 15, 1, 0);

    $display("mechanisms: stall=%0d cascade=%0d wrap=%0d reset=%0d fullscale_preadd=%0d match=%0d",
             n_stall, n_cascade, n_wrap, n_reset, n_fullscale, n_match);
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_cascade == 0) failures++;
    checks++; if (n_wrap == 0) failures++;
    checks++; if (n_reset < 2) failures++;
    checks++; if (n_fullscale == 0) failures++;
    checks++; if (n_match == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
