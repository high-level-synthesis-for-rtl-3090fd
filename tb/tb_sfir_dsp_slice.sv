// tb_sfir_dsp_slice -- self-checking test of one DSP-slice tap.
// Drives random operands and cascade inputs with a random clock enable and
// checks pcout against a two-register software model:
//   m <= h*(a+b);  pcout <= pcin + m   (32-bit wrap).
// The first product is followed explicitly to check the two-edge latency.
module tb_sfir_dsp_slice;
  localparam int DATA_W = 16, COEF_W = 13, ACC_W = 32;

  logic clk = 0, rst = 1, en = 0;
  logic signed [DATA_W-1:0] a = '0, b = '0;
  logic signed [COEF_W-1:0] h = '0;
  logic signed [ACC_W-1:0]  pcin = '0;
  logic signed [ACC_W-1:0]  pcout;
  longint m_model, pc_model;
  int checks = 0, failures = 0, stalls = 0;

  sfir_dsp_slice #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pc(longint v, string what);
    checks++;
    if (pcout !== ACC_W'(v)) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d", what, pcout, ACC_W'(v));
    end
  endtask

  initial begin
    m_model = 0; pc_model = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_pc(0, "after reset");
    // latency: operands at edge 1, product registered, sum at edge 2
    en = 1; a = 100; b = -30; h = 7; pcin = 5;
    @(posedge clk); #1;
    expect_pc(5, "edge 1");                 // pcin + old m (0)
    a = 0; b = 0; h = 0; pcin = 0;
    @(posedge clk); #1;
    expect_pc(490, "edge 2");               // 0 + 7*70
    @(posedge clk); #1;
    expect_pc(0, "edge 3");
    m_model = 0; pc_model = 0;
    for (int c = 0; c < 4000; c++) begin
      en   = ($urandom_range(0, 4) != 0);
      a    = DATA_W'($urandom);
      b    = DATA_W'($urandom);
      h    = COEF_W'($urandom);
      pcin = ACC_W'($urandom);
      @(posedge clk);
      if (en) begin
        pc_model = longint'(pcin) + m_model;
        m_model  = longint'(h) * (longint'(a) + longint'(b));
      end else stalls++;
      #1 expect_pc(pc_model, "random");
    end
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
