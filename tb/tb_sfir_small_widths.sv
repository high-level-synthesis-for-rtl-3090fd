// tb_sfir_small_widths -- both architectures built with the narrow
// configuration: 8-bit samples and 5-bit coefficients, 16 taps.
// A random stream (with stalls) and the all-minimum case are checked
// against a 64-bit reference FIR at each architecture's latency.
module tb_sfir_small_widths;
  localparam int TAPS = 16, NH = TAPS / 2, DATA_W = 8, COEF_W = 5, OUT_W = 32;

  logic clk = 0, rst = 1, en = 0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic [NH-1:0][COEF_W-1:0] coef = '0;
  logic signed [OUT_W-1:0] cas_in = '0;
  logic signed [OUT_W-1:0] y_asic, y_fpga;

  longint xs[$];
  int checks = 0, failures = 0, stalls = 0;

  sfir_top #(.TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fir(int n);
    longint s = 0;
    for (int i = 0; i < TAPS; i++) begin
      int k = (i < NH) ? i : TAPS - 1 - i;
      if (n - i >= 0 && n - i < xs.size()) s += longint'($signed(coef[k])) * xs[n - i];
    end
    return s;
  endfunction

  task automatic check(logic signed [OUT_W-1:0] got, longint want, string what);
    checks++;
    if (got !== OUT_W'(want)) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic step(logic e, logic signed [DATA_W-1:0] x);
    en = e; x_in = x;
    @(posedge clk);
    if (e) xs.push_back(longint'(x)); else stalls++;
    #1;
    check(y_asic, fir(xs.size() - 1), "asic");
    check(y_fpga, fir(xs.size() - 1 - NH), "fpga");
  endtask

  initial begin
    for (int k = 0; k < NH; k++) coef[k] = COEF_W'($urandom);
    @(posedge clk); #1 rst = 0;
    for (int c = 0; c < 2000; c++) step(($urandom_range(0, 4) != 0), DATA_W'($urandom));
    // all-minimum samples and coefficients: 16 * (-128) * (-16) = 32768
    for (int k = 0; k < NH; k++) coef[k] = COEF_W'(-16);
    rst = 1; @(posedge clk); #1 rst = 0; xs.delete();
    for (int c = 0; c < TAPS + NH + 2; c++) step(1, DATA_W'(-128));
    check(y_asic, 32768, "asic extreme");
    check(y_fpga, 32768, "fpga extreme");
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
