// vme_slave_model: behavioural model of a VME slave with 16-bit data, used by
// the testbenches as the external VME system (not synthesizable intent).
//
// It holds 256 words, indexed by addr[10:3] (the bits above the three
// interface-select bits); word i starts as (i * 16'h0101) ^ 16'h5A5A. When
// AS_bar, UDS_bar and LDS_bar have been low for dtack_delay clocks it reads
// or writes the word and pulls DTACK_bar low; once AS_bar is high again it
// waits release_delay clocks and releases DTACK_bar. It counts protocol
// errors: address or R/W_bar changing while AS_bar is low, data strobes
// without AS_bar, a write without driven data. `cycles` counts transfers.
module vme_slave_model
  import cfsm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t addr,
  input  logic  write_n,
  input  logic  as_n,
  input  logic  uds_n,
  input  logic  lds_n,
  output logic  dtack_n,
  output data_t d_out,
  input  data_t d_in,
  input  logic  d_oe,
  input  int    dtack_delay,
  input  int    release_delay,
  output int    errors,
  output int    cycles
);
  data_t mem [256];
  int    cnt;
  logic  acked;
  addr_t addr_q;
  logic  wr_q;

  initial for (int i = 0; i < 256; i++) mem[i] = data_t'((i * 16'h0101) ^ 16'h5A5A);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dtack_n <= 1'b1; d_out <= '0; cnt <= 0; acked <= 1'b0;
      errors <= 0; cycles <= 0; addr_q <= '0; wr_q <= 1'b1;
    end else begin
      addr_q <= addr;
      wr_q   <= write_n;
      if (!as_n && (addr != addr_q || write_n != wr_q)) errors <= errors + 1;
      if (as_n && (!uds_n || !lds_n)) errors <= errors + 1;
      if (!acked) begin
        if (!as_n && !uds_n && !lds_n) begin
          if (cnt >= dtack_delay) begin
            if (write_n) d_out <= mem[addr[10:3]];
            else begin
              if (!d_oe) errors <= errors + 1;
              mem[addr[10:3]] <= d_in;
            end
            dtack_n <= 1'b0;
            acked   <= 1'b1;
            cycles  <= cycles + 1;
            cnt     <= 0;
          end else cnt <= cnt + 1;
        end else cnt <= 0;
      end else if (as_n) begin
        if (cnt >= release_delay) begin
          dtack_n <= 1'b1;
          acked   <= 1'b0;
          cnt     <= 0;
        end else cnt <= cnt + 1;
      end
    end
  end
endmodule
