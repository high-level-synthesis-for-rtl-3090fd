// tb_sfir_delay_line -- self-checking test of the tapped delay line.
// Drives random samples with a random enable and compares every tap, every
// cycle, against a software shift register. Also checks reset and that
// the line holds while en is low.
module tb_sfir_delay_line;
  localparam int DATA_W = 16;
  localparam int DEPTH  = 15;

  logic clk = 0, rst = 1, en = 0;
  logic [DATA_W-1:0] din = '0;
  logic [DEPTH-1:0][DATA_W-1:0] taps;
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0, holds = 0;

  sfir_delay_line #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (taps[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("mismatch tap %0d: %h vs %h", i, taps[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    compare();
    for (int c = 0; c < 2000; c++) begin
      en  = ($urandom_range(0, 3) != 0);
      din = DATA_W'($urandom);
      @(posedge clk);
      if (en) begin
        for (int i = DEPTH - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end else holds++;
      #1 compare();
    end
    // reset clears every stage
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    compare();
    checks++; if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
