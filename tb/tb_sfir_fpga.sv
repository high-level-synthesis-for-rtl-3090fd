// tb_sfir_fpga -- self-checking test of the FPGA-architecture (systolic)
// filter.
//
// 1. Impulse response: a single 1 after reset must give h0..h7, h7..h0 on
//    consecutive cycles, the first one exactly TAPS/2 cycles after the edge
//    that takes the impulse (TAPS/2+1 edges counting that edge).
// 2. Random stream with random enable and random cas_in: after enabled edge
//    e the output must equal FIR(e - TAPS/2) + cas_in(e - TAPS/2 + 1), where
//    FIR(n) is the 64-bit reference sum for the newest sample n, wrapped to
//    32 bits.
// A second instance with 6 taps runs the same stream.
module tb_sfir_fpga;
  localparam int TAPS = 16, NH = TAPS / 2, DATA_W = 16, COEF_W = 13, OUT_W = 32;
  localparam int T6 = 6;

  logic clk = 0, rst = 1, en = 0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic [NH-1:0][COEF_W-1:0] coef = '0;
  logic signed [OUT_W-1:0] cas_in = '0;
  logic signed [OUT_W-1:0] y_out, y6;

  longint xs[$];            // samples, index = enabled-edge number
  longint cs[$];            // cas_in values, same index
  int checks = 0, failures = 0, stalls = 0;

  sfir_fpga dut (.clk, .rst, .en, .x_in, .coef, .cas_in, .y_out);
  sfir_fpga #(.TAPS(T6)) dut6 (.clk, .rst, .en, .x_in, .coef(coef[T6/2-1:0]), .cas_in,
                               .y_out(y6));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint hfull(int i, int taps);
    int k = (i < taps / 2) ? i : taps - 1 - i;
    return longint'($signed(coef[k]));
  endfunction

  function automatic longint xat(int n);
    return (n >= 0 && n < xs.size()) ? xs[n] : 0;
  endfunction

  function automatic longint cat(int n);
    return (n >= 0 && n < cs.size()) ? cs[n] : 0;
  endfunction

  // Expected output after enabled edge e for a taps-long filter.
  function automatic logic signed [OUT_W-1:0] model(int e, int taps);
    longint s = 0;
    int n = e - taps / 2;
    for (int i = 0; i < taps; i++) s += hfull(i, taps) * xat(n - i);
    s += cat(e - taps / 2 + 1);
    return OUT_W'(s);
  endfunction

  task automatic do_reset();
    rst = 1; en = 0;
    @(posedge clk); #1 rst = 0;
    xs.delete(); cs.delete();
  endtask

  task automatic check(logic signed [OUT_W-1:0] got, logic signed [OUT_W-1:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d at %0t", what, got, want, $time);
    end
  endtask

  task automatic step(logic e, logic signed [DATA_W-1:0] x, logic signed [OUT_W-1:0] c);
    en = e; x_in = x; cas_in = c;
    @(posedge clk);
    if (e) begin
      xs.push_back(longint'(x));
      cs.push_back(longint'(c));
    end else stalls++;
    #1;
  endtask

  initial begin
    for (int k = 0; k < NH; k++) coef[k] = COEF_W'($urandom);
    do_reset();
    check(y_out, 0, "reset");
    // impulse response: zero until NH edges after the impulse edge
    step(1, 1, 0);
    for (int i = 0; i < NH - 1; i++) begin
      check(y_out, 0, "latency (still zero)");
      step(1, 0, 0);
    end
    check(y_out, 0, "latency (still zero)");
    for (int i = 0; i < TAPS; i++) begin
      step(1, 0, 0);
      check(y_out, OUT_W'(hfull(i, TAPS)), "impulse");
    end
    step(1, 0, 0);
    check(y_out, 0, "impulse tail");
    // random streams, new coefficients after each reset
    for (int r = 0; r < 6; r++) begin
      for (int k = 0; k < NH; k++) coef[k] = COEF_W'($urandom);
      do_reset();
      for (int c = 0; c < 500; c++) begin
        step(($urandom_range(0, 4) != 0), DATA_W'($urandom),
             (r % 2 == 0) ? OUT_W'(0) : OUT_W'($urandom));
        check(y_out, model(xs.size() - 1, TAPS), "random");
        check(y6, model(xs.size() - 1, T6), "random 6-tap");
      end
    end
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
