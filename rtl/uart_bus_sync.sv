// uart_bus_sync: host interface of the UART.
//
// The host may run from a clock unrelated to the UART clock. Following the
// published scheme, only the control signals cs, rd and wr are synchronised
// (two flip-flops each); the address and data are taken to be stable while
// the host holds rd or wr, so capturing them when the synchronised control
// arrives synchronises them indirectly.
//
// This design turns the rising edge of the synchronised (cs & wr) into a
// one-cycle reg_wr strobe, and likewise (cs & rd) into reg_rd, so one host
// access produces exactly one register access however long it lasts. addr and
// data_in are captured in the same clock edge that raises the strobe.
//
// Timing: reg_wr / reg_rd rise 3 clock edges after cs & wr / cs & rd are first
// sampled high, and last one cycle. The host must hold addr/data_in stable
// and keep rd or wr high for at least 4 UART clock cycles, and keep them low
// at least 3 cycles between accesses.
module uart_bus_sync (
  input  logic       clk,
  input  logic       rst,
  input  logic       cs,
  input  logic       rd,
  input  logic       wr,
  input  logic [3:0] addr,
  input  logic [7:0] data_in,
  output logic       reg_rd,
  output logic       reg_wr,
  output logic [3:0] reg_addr,
  output logic [7:0] reg_wdata
);

  logic [2:0] meta, sync;   // {cs, rd, wr}
  logic       rd_q, wr_q;   // previous synchronised access state

  logic rd_now, wr_now;
  assign rd_now = sync[2] && sync[1];
  assign wr_now = sync[2] && sync[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      meta      <= '0;
      sync      <= '0;
      rd_q      <= 1'b0;
      wr_q      <= 1'b0;
      reg_rd    <= 1'b0;
      reg_wr    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
    end else begin
      meta   <= {cs, rd, wr};
      sync   <= meta;
      rd_q   <= rd_now;
      wr_q   <= wr_now;
      reg_rd <= rd_now && !rd_q;
      reg_wr <= wr_now && !wr_q;
      if ((rd_now && !rd_q) || (wr_now && !wr_q)) begin
        reg_addr  <= addr;
        reg_wdata <= data_in;
      end
    end
  end

  // Never both a read and a write strobe in one cycle unless the host drove both.
  a_one_strobe: assert property (@(posedge clk) disable iff (rst)
                                 (reg_rd && reg_wr) |-> $past(rd_now && wr_now));

endmodule
