// target_model: behavioural model of an interface behind the communication
// controller (an ASIC, an FPGA or another external resource), used by the
// testbenches.
//
// It consumes a pending request event after `delay` clocks, reads or writes
// one of 256 words (index addr[10:3]) and emits the acknowledge event with
// the read data on the same edge. Word i starts as (i * 16'h0107) ^ TAG.
// `served` counts the requests it has answered.
module target_model
  import cfsm_pkg::*;
#(
  parameter logic [15:0] TAG = 16'h0000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_present,
  input  xfer_req_t req_val,
  output logic      req_detect,
  output logic      ack_emit,
  output data_t     ack_val,
  input  int        delay,
  output int        served
);
  data_t mem [256];
  int    cnt;

  initial for (int i = 0; i < 256; i++) mem[i] = data_t'((i * 16'h0107) ^ TAG);

  assign req_detect = req_present && (cnt >= delay);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; ack_emit <= 1'b0; ack_val <= '0; served <= 0;
    end else begin
      ack_emit <= 1'b0;
      if (req_detect) begin
        cnt      <= 0;
        ack_emit <= 1'b1;
        served   <= served + 1;
        if (req_val.rw) ack_val <= mem[req_val.addr[10:3]];
        else            mem[req_val.addr[10:3]] <= req_val.wdata;
      end else if (req_present) cnt <= cnt + 1;
    end
  end
endmodule
