// Test of the input enable register: reset clears it, it loads on a clock edge
// with en high and holds with en low. A reference model tracks the expected
// value cycle by cycle.
module tb_en_reg;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0, cycles = 0;

  en_reg #(.W(W)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    d = 32'hDEAD_BEEF;
    #1 rst_n = 0;  // a real falling edge, so the asynchronous reset fires
    #11;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = $urandom;
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d en=%b q=%h expected %h", n, en, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
