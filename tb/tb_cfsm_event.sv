// tb_cfsm_event: self-checking test of the one-place event buffer.
// Directed cases (emit, hold until detect, overwrite, emit and detect in the
// same cycle) followed by 500 random cycles compared against a reference
// model kept in the testbench.
module tb_cfsm_event;
  localparam int unsigned VW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic emit = 1'b0, detect = 1'b0;
  logic [VW-1:0] emit_val = '0;
  logic present, overwritten;
  logic [VW-1:0] val;
  int checks = 0, failures = 0;

  cfsm_event #(.VAL_W(VW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic drive(input logic e, input logic [VW-1:0] v, input logic d);
    emit = e; emit_val = v; detect = d;
    @(posedge clk); #1;
    emit = 1'b0; detect = 1'b0;
  endtask

  // reference model
  logic          m_present, m_ovw;
  logic [VW-1:0] m_val;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(!present && !overwritten, "empty after reset");
    drive(1'b1, 8'hA5, 1'b0);
    chk(present && val == 8'hA5 && !overwritten, "event posted");
    drive(1'b0, 8'h00, 1'b0);
    drive(1'b0, 8'h00, 1'b0);
    chk(present && val == 8'hA5, "event held until detected");
    drive(1'b0, 8'h00, 1'b1);
    chk(!present, "detect consumes");
    drive(1'b1, 8'h11, 1'b0);
    drive(1'b1, 8'h22, 1'b0);
    chk(present && val == 8'h22 && overwritten, "overwrite keeps newest and flags");
    drive(1'b0, 8'h00, 1'b0);
    chk(!overwritten, "overwrite flag is a pulse");
    drive(1'b1, 8'h33, 1'b1);
    chk(present && val == 8'h33 && !overwritten, "emit+detect same cycle keeps new");
    drive(1'b0, 8'h00, 1'b1);
    chk(!present, "empty again");

    m_present = 1'b0; m_val = val; m_ovw = 1'b0;
    for (int i = 0; i < 500; i++) begin
      logic e, d;
      logic [VW-1:0] v;
      e = ($urandom % 3) == 0;
      d = ($urandom % 2) == 0;
      v = VW'($urandom);
      m_ovw = e && m_present && !d;
      if (e) begin m_present = 1'b1; m_val = v; end
      else if (d) m_present = 1'b0;
      drive(e, v, d);
      chk(present == m_present && overwritten == m_ovw &&
          (!m_present || val == m_val), "random vs model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
