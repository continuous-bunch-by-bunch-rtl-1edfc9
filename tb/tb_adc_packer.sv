// Self-checking testbench for adc_packer: random sample pairs, checks lane
// placement, zero and sign filling of the spare bits and the one-clock
// latency, on a 12-bit two-ADC instance and a 14-bit four-ADC
// sign-extending instance.
`timescale 1ns/1ps
module tb_adc_packer;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic [1:0][11:0] s2;
  logic             v2;
  logic [31:0]      w2;
  logic             wv2;
  logic [3:0][13:0] s4;
  logic             v4;
  logic [63:0]      w4;
  logic             wv4;

  adc_packer dut2 (.clk, .rst_n, .samples(s2), .sample_valid(v2), .word(w2), .word_valid(wv2));
  adc_packer #(.ADC_BITS(14), .NUM_ADC(4), .SIGN_EXTEND(1'b1)) dut4 (
    .clk, .rst_n, .samples(s4), .sample_valid(v4), .word(w4), .word_valid(wv4));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0][11:0] p2;
    logic [3:0][13:0] p4;
    logic             pv2, pv4;
    s2 = '0; v2 = 0; s4 = '0; v4 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      s2 = {12'($urandom), 12'($urandom)};
      v2 = 1'($urandom);
      for (int i = 0; i < 4; i++) s4[i] = 14'($urandom);
      v4 = 1'($urandom);
      p2 = s2; p4 = s4; pv2 = v2; pv4 = v4;
      @(posedge clk);
      #0.5;
      // expected values are rebuilt from the samples bit by bit
      check(w2[15:0]  == {4'h0, p2[0]}, $sformatf("lane0 %h vs %h", w2[15:0], p2[0]));
      check(w2[31:16] == {4'h0, p2[1]}, $sformatf("lane1 %h vs %h", w2[31:16], p2[1]));
      check(wv2 == pv2, "valid latency (2 ADC)");
      for (int i = 0; i < 4; i++)
        check(w4[16*i +: 16] == {{2{p4[i][13]}}, p4[i]},
              $sformatf("sign-extended lane %0d %h vs %h", i, w4[16*i +: 16], p4[i]));
      check(wv4 == pv4, "valid latency (4 ADC)");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
