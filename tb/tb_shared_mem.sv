// tb_shared_mem: self-checking test of the shared memory interface.
// Random reads and writes through the request event are compared with a
// shadow array (with random values in the address bits the memory must
// ignore); every request must be consumed in the cycle it is present
// and acknowledged exactly one clock later.
module tb_shared_mem;
  import cfsm_pkg::*;
  localparam int W = 1024;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      req_present = 1'b0, req_detect, ack_emit;
  xfer_req_t req_val = '0;
  data_t     ack_val;
  int checks = 0, failures = 0;

  shared_mem #(.MEM_WORDS(W)) dut (.*);

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  data_t shadow [W];
  logic  written [W];

  task automatic access(input logic rw, input int idx, input data_t wd);
    @(negedge clk);
    req_present = 1'b1;
    // the three interface-select bits and the bits above the array must
    // not change the word that is reached
    req_val = '{rw: rw, addr: addr_t'({3'($urandom), idx[17:0], 3'($urandom)}), wdata: wd};
    #1 chk(req_detect, "request consumed at once");
    @(posedge clk); #1;
    req_present = 1'b0;
    chk(ack_emit, "acknowledge one clock later");
    if (rw) chk(ack_val == shadow[idx], "read data");
    else shadow[idx] = wd;
    @(posedge clk); #1;
    chk(!ack_emit, "acknowledge is a pulse");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(!ack_emit, "quiet after reset");
    for (int i = 0; i < W; i++) written[i] = 1'b0;
    access(1'b0, 0, 16'h1111);
    access(1'b0, W - 1, 16'h2222);
    access(1'b1, 0, 16'h0);
    access(1'b1, W - 1, 16'h0);
    written[0] = 1'b1; written[W-1] = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int idx;
      idx = ($urandom % 2) ? $urandom % 64 : $urandom % W;
      if (!written[idx] || ($urandom % 2)) begin
        access(1'b0, idx, data_t'($urandom));
        written[idx] = 1'b1;
      end else access(1'b1, idx, 16'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
