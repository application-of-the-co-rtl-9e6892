// tb_bus_arbiter: self-checking test of the eight-line bus arbiter.
// Directed checks show the one-clock grant latency, the hold-until-release
// rule and the three priority options choosing differently for the same
// requests. Then, for each option, 1500 cycles of random requesters (a
// requester keeps its line up until served, then releases it after a random
// time) are compared cycle by cycle with a reference model.
module tb_bus_arbiter;
  import cfsm_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  arb_mode_e mode = ARB_FIXED;
  logic [N-1:0] req = '0, grant;
  logic busy;
  int checks = 0, failures = 0;

  bus_arbiter #(.N_REQ(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: req=%b grant=%b", what, $time, req, grant);
    end
  endtask

  // Reference winner for a given option.
  function automatic logic [N-1:0] ref_win(arb_mode_e m, logic [N-1:0] r, int last);
    ref_win = '0;
    case (m)
      ARB_ROUND_ROBIN: begin
        for (int k = 1; k <= N; k++)
          if (r[(last + k) % N]) return N'(1) << ((last + k) % N);
      end
      ARB_DAISY_CHAIN: begin
        for (int i = 0; i < N; i++) if (r[i]) return N'(1) << i;
      end
      default: begin
        for (int i = N - 1; i >= 0; i--) if (r[i]) return N'(1) << i;
      end
    endcase
  endfunction

  task automatic step(input logic [N-1:0] r);
    @(negedge clk); req = r;
    @(posedge clk); #1;
  endtask

  task automatic do_reset();
    rst_n = 1'b0; req = '0;
    @(posedge clk); #1 rst_n = 1'b1;
  endtask

  logic [N-1:0] m_grant;
  int           m_last;
  int           hold [N];
  int           contended;

  initial begin
    // ---- directed ----
    do_reset();
    chk(grant == '0 && !busy, "idle after reset");
    @(negedge clk); req = 8'b0000_0100;
    #1 chk(grant == '0, "no combinational grant");
    @(posedge clk); #1;
    chk(grant == 8'b0000_0100 && busy, "grant one clock after request");
    step(8'b1000_0101);
    chk(grant == 8'b0000_0100, "grant held while owner requests");
    step(8'b1000_0001);
    chk(grant == 8'b1000_0000, "fixed: highest level wins on release");
    mode = ARB_DAISY_CHAIN;
    step(8'b0000_0001);
    chk(grant == 8'b0000_0001, "daisy: re-arbitrated on release");
    step(8'b1000_0000);
    chk(grant == 8'b1000_0000, "daisy: single requester");
    step(8'b0100_0011);
    chk(grant == 8'b0000_0001, "daisy: line 0 first in the chain");
    mode = ARB_ROUND_ROBIN;
    step(8'b0100_0010);
    chk(grant == 8'b0000_0010, "round robin: next after last grant (0)");
    step(8'b0100_0001);
    chk(grant == 8'b0100_0000, "round robin: search continues after line 1");
    step(8'b0000_0001);
    chk(grant == 8'b0000_0001, "round robin: wraps around");
    step(8'b0000_0000);
    chk(grant == '0, "idle when nobody requests");

    // ---- random against the model ----
    for (int mi = 0; mi < 3; mi++) begin
      mode = arb_mode_e'(mi);
      do_reset();
      m_grant = '0; m_last = N - 1; contended = 0;
      for (int i = 0; i < N; i++) hold[i] = 0;
      for (int cyc = 0; cyc < 1500; cyc++) begin
        logic [N-1:0] r;
        @(negedge clk);
        r = req;
        for (int i = 0; i < N; i++) begin
          if (!r[i]) begin
            if ($urandom % 6 == 0) begin r[i] = 1'b1; hold[i] = 1 + $urandom % 4; end
          end else if (grant[i]) begin
            if (hold[i] == 0) r[i] = 1'b0; else hold[i]--;
          end
        end
        req = r;
        if ((m_grant & req) == '0) begin
          if ($countones(req) > 1) contended++;
          m_grant = ref_win(mode, req, m_last);
          for (int i = 0; i < N; i++) if (m_grant[i]) m_last = i;
        end
        @(posedge clk); #1;
        chk(grant == m_grant, "random vs model");
      end
      chk(contended > 50, "enough contended arbitrations");
      $display("mode %0d: %0d contended arbitrations", mi, contended);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
