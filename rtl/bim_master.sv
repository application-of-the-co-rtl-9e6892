// bim_master: bus interface model (BIM) of a processor on the shared bus.
//
// The 80486 and the DSP are represented on the bus only by their bus
// transactions: this FSM turns one read or write command into the bus
// handshake of the platform. Per transaction it
//   Idle   -> on a command, raises the bus request (BReq)          -> Wait
//   Wait   -> stays while Grant is low; on Grant                   -> State1
//   State1 -> address (and write data) are on the bus               -> State2
//   State2 -> RD_bar or W_bar asserted (low), stays while READY is
//             low; on READY negates the strobe, drops BReq, takes
//             the read data (DATA IN) and reports done             -> Idle
// The states, the strobes and the READY/Grant conditions follow the bus
// transaction state diagram of the processor. Holding BReq for the whole
// transaction, the command interface and reset values are this design's
// choices. All bus outputs are registered.
//
// Interface and timing
//   cmd_valid/cmd_rw/cmd_addr/cmd_wdata  command, taken when cmd_ready = 1;
//                 cmd_rw = 1 reads, 0 writes.
//   done/done_rdata  one-cycle pulse when the transaction ends; done_rdata
//                 holds the read data from then on.
//   breq/grant, addr/wdata/rd_n/wr_n, ready/rdata: bus side.
// From grant, a transfer takes 2 clocks to the strobe, then the target's
// time to READY, then 1 clock back to Idle.
module bim_master
  import cfsm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // processor side
  input  logic  cmd_valid,
  input  logic  cmd_rw,
  input  addr_t cmd_addr,
  input  data_t cmd_wdata,
  output logic  cmd_ready,
  output logic  done,
  output data_t done_rdata,
  // bus side
  output logic  breq,
  input  logic  grant,
  output addr_t addr,
  output data_t wdata,
  output logic  rd_n,
  output logic  wr_n,
  input  logic  ready,
  input  data_t rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_STATE1, S_STATE2} state_e;
  state_e state;
  logic   rw_q;

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rw_q       <= 1'b1;
      breq       <= 1'b0;
      addr       <= '0;
      wdata      <= '0;
      rd_n       <= 1'b1;
      wr_n       <= 1'b1;
      done       <= 1'b0;
      done_rdata <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin          // RD/BReq or W/BReq
          rw_q  <= cmd_rw;
          addr  <= cmd_addr;
          wdata <= cmd_wdata;
          breq  <= 1'b1;
          state <= S_WAIT;
        end
        S_WAIT: if (grant) state <= S_STATE1; // Grant.Sync
        S_STATE1: begin                       // Req.Inter / Sync
          if (rw_q) rd_n <= 1'b0;             // assert RD_bar
          else      wr_n <= 1'b0;             // assert W_bar
          state <= S_STATE2;
        end
        S_STATE2: if (ready) begin            // READY
          rd_n <= 1'b1;
          wr_n <= 1'b1;
          breq <= 1'b0;
          if (rw_q) done_rdata <= rdata;      // DATA IN
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A strobe is only driven while this master owns the bus.
  a_strobe_owned : assert property (@(posedge clk) disable iff (!rst_n)
                                    (!rd_n || !wr_n) |-> (grant && breq));

endmodule
