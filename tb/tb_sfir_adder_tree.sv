// tb_sfir_adder_tree -- self-checking test of the balanced adder tree.
// Eight signed 30-bit terms; the sum is compared with 64-bit arithmetic
// wrapped to 32 bits. Includes the all-minimum case, whose true sum is
// -2^32 and must wrap to 0, and a one-hot sweep that exercises every leaf.
// A second instance with three leaves checks the zero padding used for
// lengths that are not a power of two.
module tb_sfir_adder_tree;
  localparam int N = 8, IN_W = 30, OUT_W = 32;

  logic [N-1:0][IN_W-1:0] terms;
  logic signed [OUT_W-1:0] sum;
  logic [2:0][IN_W-1:0] terms3;
  logic signed [OUT_W-1:0] sum3;
  int checks = 0, failures = 0;

  sfir_adder_tree #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.terms(terms), .sum(sum));
  sfir_adder_tree #(.N(3), .IN_W(IN_W), .OUT_W(OUT_W)) dut3 (.terms(terms3), .sum(sum3));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [OUT_W-1:0] ref_sum(input logic [N-1:0][IN_W-1:0] t, int n);
    longint s = 0;
    for (int i = 0; i < n; i++) s += longint'($signed(t[i]));
    return OUT_W'(s);
  endfunction

  task automatic check_now();
    logic [N-1:0][IN_W-1:0] t3;
    t3 = '0;
    t3[2:0] = terms3;
    #1;
    checks++;
    if (sum !== ref_sum(terms, N)) begin
      failures++;
      if (failures < 10) $display("mismatch: got %0d want %0d", sum, ref_sum(terms, N));
    end
    checks++;
    if (sum3 !== ref_sum(t3, 3)) begin
      failures++;
      if (failures < 10) $display("mismatch (3 leaves): got %0d", sum3);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) terms[i] = {1'b1, {(IN_W-1){1'b0}}};
    terms3 = terms[2:0];
    check_now();
    for (int i = 0; i < N; i++) terms[i] = {1'b0, {(IN_W-1){1'b1}}};
    terms3 = terms[2:0];
    check_now();
    for (int i = 0; i < N; i++) begin
      terms = '0; terms[i] = IN_W'(i + 1) * 1000;
      terms3 = terms[2:0];
      check_now();
    end
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < N; i++) terms[i] = IN_W'($urandom);
      terms3 = terms[2:0];
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
