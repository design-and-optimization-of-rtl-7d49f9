// Test of the 2:1 multiplexer: exhaustive at 1 bit (the default), random at
// 33 bits (the width the adder's output uses).
module tb_mux2;
  logic a1, b1, s1, y1;
  logic [32:0] aw, bw, yw;
  logic sw;
  int checks = 0, failures = 0;

  mux2 dut1 (.a(a1), .b(b1), .sel(s1), .y(y1));
  mux2 #(.W(33)) dutw (.a(aw), .b(bw), .sel(sw), .y(yw));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s1, a1, b1} = 3'(v);
      #1;
      checks++;
      if (y1 !== (s1 ? b1 : a1)) begin
        failures++;
        $display("FAIL mux2 sel=%b a=%b b=%b y=%b", s1, a1, b1, y1);
      end
    end
    for (int n = 0; n < 200; n++) begin
      aw = {$urandom, $urandom};
      bw = {$urandom, $urandom};
      sw = 1'($urandom);
      #1;
      checks++;
      if (yw !== (sw ? bw : aw)) begin
        failures++;
        $display("FAIL mux2 wide sel=%b", sw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
