// Test of the variable-latency control with random in_valid and ER. A
// cycle-level reference (two state bits: operation under way, recovery cycle)
// predicts every output; the test also requires that blocked cycles,
// recovery cycles, plain results and idle cycles all occur.
module tb_cspa_ctrl;
  logic clk = 0, rst_n = 1, in_valid = 0, er = 0;
  logic in_ready, load, err_block, op_valid, sel_rec, out_valid;
  logic m_op = 0, m_rec = 0;
  int checks = 0, failures = 0, n_block = 0, n_rec = 0, n_plain = 0, n_idle = 0;

  cspa_ctrl dut (.clk, .rst_n, .in_valid, .er, .in_ready, .load, .err_block,
                 .op_valid, .sel_rec, .out_valid);

  always #5 clk = ~clk;

  initial begin
    #1 rst_n = 0;  // a real falling edge, so the asynchronous reset fires
    #11 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      er       = ($urandom % 3) == 0;
      #1;
      begin
        logic e_blk, e_rdy, e_load, e_out;
        e_blk  = m_op & er;
        e_rdy  = ~e_blk;
        e_load = in_valid & e_rdy;
        e_out  = (m_op & ~er) | m_rec;
        checks++;
        if (op_valid !== m_op || sel_rec !== m_rec || err_block !== e_blk ||
            in_ready !== e_rdy || load !== e_load || out_valid !== e_out) begin
          failures++;
          $display("FAIL cycle %0d: op=%b rec=%b blk=%b rdy=%b load=%b out=%b", n,
                   op_valid, sel_rec, err_block, in_ready, load, out_valid);
        end
        if (e_blk) n_block++;
        if (m_rec) n_rec++;
        if (m_op & ~er) n_plain++;
        if (!m_op && !m_rec) n_idle++;
        @(posedge clk);
        m_op  = e_load;
        m_rec = e_blk;
      end
    end
    checks++;
    if (n_block == 0 || n_rec == 0 || n_plain == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL coverage block=%0d rec=%0d plain=%0d idle=%0d", n_block, n_rec, n_plain, n_idle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
