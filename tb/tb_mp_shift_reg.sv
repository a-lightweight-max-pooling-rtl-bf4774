// tb_mp_shift_reg: self-checking test of the line buffer.
// Random entries are shifted in with random enable gaps; a reference history
// (newest first) is kept in the testbench and every stage is compared with it
// after each clock. Checks also that nothing moves while shift_en is low.
module tb_mp_shift_reg;
  localparam int unsigned W = 9, LEN = 7;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0;
  logic [W-1:0] din = '0;
  logic [LEN-1:0][W-1:0] taps;
  logic [W-1:0] hist [LEN];
  int checks = 0, failures = 0;

  mp_shift_reg #(.W(W), .LEN(LEN)) dut (.clk, .rst_n, .shift_en, .din, .taps_o(taps));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[k]) hist[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      shift_en = ($urandom_range(0, 3) != 0);
      din      = W'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int k = LEN - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = din;
      end
      @(negedge clk);
      for (int k = 0; k < LEN; k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin
          failures++;
          if (failures < 10) $display("t=%0d stage %0d: got %h expected %h", t, k, taps[k], hist[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
