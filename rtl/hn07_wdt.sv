// hn07_wdt: watchdog timer on its own clock.
//
// An 8-bit counter behind a 7-bit prescaler, both clocked by clkwdt, which is
// independent of the system clock as the document requires. WDTCON (0x97,
// bits 2:0 = PS, reset 7) selects the prescale ratio 2^PS, 1:1 .. 1:128, so
// the time-out is 256 * 2^PS clkwdt periods (the "configurable time-out
// range"; the register is this design's choice). The watchdog runs while the
// wdte pin is high. CLRWDT and SLEEP clear it through `clr` (system clock
// domain): the request crosses as a toggle through two flops. A time-out
// crosses back the same way and gives a one-clock `timeout` pulse in the
// system clock domain, which the top turns into a reset. Its own reset
// (rst_n) comes from power-on and master clear only, so a watchdog reset does
// not clear the watchdog's configuration. Settings cross as quasi-static
// levels through two flops. Bits 7:3 of WDTCON are unimplemented and read
// as 0, so those read-data bits are constant by design.
module hn07_wdt
  import hn07_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clkwdt,
  input  logic       wdte,
  input  daddr_t     sfr_raddr,
  output logic [7:0] sfr_rdata,
  input  daddr_t     sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic       sfr_we,
  input  logic       clr,
  output logic       timeout
);
  // system clock domain
  logic [2:0] ps;
  logic       clr_tgl;
  logic [2:0] to_s;
  // watchdog clock domain
  logic [2:0] ps_s1, ps_s2, clr_s;
  logic [1:0] en_s;
  logic [6:0] pre;
  logic [7:0] cnt;
  logic       to_tgl, pre_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps      <= 3'd7;
      clr_tgl <= 1'b0;
      to_s    <= '0;
      timeout <= 1'b0;
    end else begin
      if (sfr_we && sfr_waddr == A_WDTCON) ps <= sfr_wdata[2:0];
      if (clr) clr_tgl <= !clr_tgl;
      to_s    <= {to_s[1:0], to_tgl};
      timeout <= to_s[1] ^ to_s[2];
    end
  end

  assign pre_done = pre == 7'((8'd1 << ps_s2) - 8'd1);

  always_ff @(posedge clkwdt or negedge rst_n) begin
    if (!rst_n) begin
      ps_s1 <= 3'd7; ps_s2 <= 3'd7; clr_s <= '0; en_s <= '0;
      pre <= '0; cnt <= '0; to_tgl <= 1'b0;
    end else begin
      ps_s1 <= ps;
      ps_s2 <= ps_s1;
      clr_s <= {clr_s[1:0], clr_tgl};
      en_s  <= {en_s[0], wdte};
      if ((clr_s[1] ^ clr_s[2]) || !en_s[1]) begin
        pre <= '0;
        cnt <= '0;
      end else if (pre_done) begin
        pre <= '0;
        cnt <= cnt + 8'd1;
        if (cnt == 8'hFF) to_tgl <= !to_tgl;
      end else begin
        pre <= pre + 7'd1;
      end
    end
  end

  assign sfr_rdata = (sfr_raddr == A_WDTCON) ? {5'b0, ps} : 8'h00;
endmodule
