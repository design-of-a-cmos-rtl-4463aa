// Test of the coding block: one-hot bit k gives (32 - k) mod 32, so bit 0 gives 0,
// bit 1 gives 31 and bit 5 gives 27; an all-zero input gives hit low.
module tdc_coder_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic [31:0] onehot;
  logic [4:0]  code;
  logic        hit;
  int checks = 0, failures = 0;

  tdc_coder #(.N(32)) u_dut (.onehot, .code, .hit);

  initial begin
    for (int k = 0; k < 32; k++) begin
      onehot = 32'(1) << k;
      #1;
      checks++;
      if (code != 5'((32 - k) % 32) || !hit) begin
        failures++;
        $display("FAIL: bit %0d gives %0d", k, code);
      end
    end
    onehot = 32'(1) << 5;
    #1 checks++;
    if (code != 5'd27) begin failures++; $display("FAIL: bit 5 must give 27"); end
    onehot = '0;
    #1 checks++;
    if (hit) begin failures++; $display("FAIL: hit with no bit set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
