// tb_sfir_preadd_mult -- self-checking test of one symmetric tap.
// Compares h*(a+b) with 64-bit integer arithmetic for the extreme operand
// values (where a 16-bit pre-adder would overflow) and for random values.
module tb_sfir_preadd_mult;
  localparam int DATA_W = 16, COEF_W = 13, PROD_W = 30;

  logic signed [DATA_W-1:0] a, b;
  logic signed [COEF_W-1:0] h;
  logic signed [PROD_W-1:0] p;
  int checks = 0, failures = 0;

  sfir_preadd_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(longint av, longint bv, longint hv);
    longint expect_v;
    a = DATA_W'(av); b = DATA_W'(bv); h = COEF_W'(hv);
    #1;
    expect_v = hv * (av + bv);
    checks++;
    if (longint'(p) != expect_v) begin
      failures++;
      if (failures < 10) $display("mismatch %0d*(%0d+%0d): got %0d want %0d", hv, av, bv, p, expect_v);
    end
  endtask

  initial begin
    automatic longint ex [4] = '{-32768, 32767, 0, -1};
    automatic longint hx [4] = '{-4096, 4095, 0, 1};
    foreach (ex[i]) foreach (ex[j]) foreach (hx[k]) check_one(ex[i], ex[j], hx[k]);
    for (int n = 0; n < 5000; n++)
      check_one(longint'($signed(16'($urandom))), longint'($signed(16'($urandom))),
                longint'($signed(13'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
