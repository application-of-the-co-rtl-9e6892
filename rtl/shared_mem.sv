// shared_mem: the memory that all sub-systems of the platform share over the
// bus.
//
// It sits behind the communication controller as the interface selected by
// communication nature 0. A request event is taken as soon as it is present;
// the word is read or written at that clock edge and the acknowledge event
// (carrying the read data) is emitted on the same edge, so a memory access
// costs one clock. The word index is the address above the three
// interface-select bits: addr[SEL_W +: log2(MEM_WORDS)]; higher bits are
// ignored. The size (1024 words of 16 bits), the timing and the addressing
// are this design's choices; the platform names the shared memory but does
// not size it. The array has no reset; read only what was written.
//
// Interface
//   req_present/req_val/req_detect: request event (rw = 1 read, 0 write).
//   ack_emit/ack_val: one-cycle acknowledge event with the read data.
module shared_mem
  import cfsm_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_present,
  input  xfer_req_t req_val,
  output logic      req_detect,
  output logic      ack_emit,
  output data_t     ack_val
);

  localparam int unsigned MAW = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1;

  data_t           mem [MEM_WORDS];
  logic [MAW-1:0]  idx;

  assign idx        = req_val.addr[SEL_W +: MAW];
  assign req_detect = req_present;

  always_ff @(posedge clk) begin
    if (req_present && !req_val.rw) mem[idx] <= req_val.wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_emit <= 1'b0;
      ack_val  <= '0;
    end else begin
      ack_emit <= req_present;
      if (req_present && req_val.rw) ack_val <= mem[idx];
    end
  end

endmodule
