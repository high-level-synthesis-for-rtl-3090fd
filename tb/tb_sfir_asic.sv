// tb_sfir_asic -- self-checking test of the ASIC-architecture filter.
//
// 1. Impulse response: after reset a single sample of 1 must produce the
//    coefficients h0..h7 followed by the mirror h7..h0, one per cycle,
//    starting right after the edge that takes the impulse (latency 1),
//    then zeros.
// 2. Random stream with a random enable: every cycle y_out is compared
//    with y[n] = sum_i hf[i]*x[n-i] computed in 64-bit arithmetic from the
//    full 16-entry mirrored coefficient list, wrapped to 32 bits.
// 3. Extreme values: all samples -32768 and all coefficients -4096 give
//    2^31, which wraps to -2^31 in the 32-bit result.
// A second instance with 6 taps (3 multipliers) runs the same random stream.
module tb_sfir_asic;
  localparam int TAPS = 16, NH = TAPS / 2, DATA_W = 16, COEF_W = 13, OUT_W = 32;
  localparam int T6 = 6;

  logic clk = 0, rst = 1, en = 0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic [NH-1:0][COEF_W-1:0] coef = '0;
  logic signed [OUT_W-1:0] y_out, y6;

  longint hist [TAPS];
  int checks = 0, failures = 0, stalls = 0;

  sfir_asic dut (.clk, .rst, .en, .x_in, .coef, .y_out);
  sfir_asic #(.TAPS(T6)) dut6 (.clk, .rst, .en, .x_in, .coef(coef[T6/2-1:0]), .y_out(y6));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Coefficient i of the full (unfolded) impulse response of a taps-long filter.
  function automatic longint hfull(int i, int taps);
    int k = (i < taps / 2) ? i : taps - 1 - i;
    return longint'($signed(coef[k]));
  endfunction

  function automatic logic signed [OUT_W-1:0] model(int taps);
    longint s = 0;
    for (int i = 0; i < taps; i++) s += hfull(i, taps) * hist[i];
    return OUT_W'(s);
  endfunction

  task automatic clear_hist();
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
  endtask

  task automatic do_reset();
    rst = 1; en = 0;
    @(posedge clk); #1 rst = 0;
    clear_hist();
  endtask

  task automatic check(logic signed [OUT_W-1:0] got, logic signed [OUT_W-1:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d at %0t", what, got, want, $time);
    end
  endtask

  // One clock; when en is high the sample x_in enters the filter.
  task automatic step(logic e, logic signed [DATA_W-1:0] x);
    en = e; x_in = x;
    @(posedge clk);
    if (e) begin
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'(x);
    end else stalls++;
    #1;
  endtask

  initial begin
    for (int k = 0; k < NH; k++) coef[k] = COEF_W'($urandom);
    do_reset();
    check(y_out, 0, "reset");
    // impulse response and latency
    step(1, 1);
    for (int i = 0; i < TAPS; i++) begin
      check(y_out, OUT_W'(hfull(i, TAPS)), "impulse");
      step(1, 0);
    end
    check(y_out, 0, "impulse tail");
    // random stream
    for (int c = 0; c < 3000; c++) begin
      if (c % 500 == 0) for (int k = 0; k < NH; k++) coef[k] = COEF_W'($urandom);
      step(($urandom_range(0, 4) != 0), DATA_W'($urandom));
      check(y_out, model(TAPS), "random");
      check(y6, model(T6), "random 6-tap");
    end
    // extreme values wrap at 32 bits
    for (int k = 0; k < NH; k++) coef[k] = {1'b1, {(COEF_W-1){1'b0}}};
    for (int c = 0; c < TAPS; c++) step(1, {1'b1, {(DATA_W-1){1'b0}}});
    check(y_out, model(TAPS), "extreme");
    check(y_out, {1'b1, {(OUT_W-1){1'b0}}}, "extreme wrap");
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
