// hn07: top level of the HN-07 8-bit microcontroller core.
//
// Four kinds of block, as in the HN-07 block diagram: the CPU (5-stage
// pipeline, hn07_cpu), the dual-port data RAM (512 x 8), the interrupt
// controller, and the peripherals (four I/O ports, Timer0, Timer1, Timer2,
// CCP1, USART and watchdog), all joined to the CPU by one SFR bus. Each
// peripheral decodes its own addresses and returns 0 elsewhere, so the read
// bus is the OR of all of them. Program memory is outside: the core drives
// prgaddr[15:0] and reads the 14-bit word on prgdata in the same cycle.
//
// Pins follow the document's port list, except that each bidirectional port
// pin is split into pin input, output value and output enable (the pad cell
// is not part of this RTL): port_in/port_out/port_oe[0..3] = ports a..d.
//
// Reset: por or mclr reset everything asynchronously; a watchdog time-out
// resets everything except the watchdog. The reset is released
// synchronously, two clocks after the last request. The synchroniser flops
// are cleared asynchronously by por/mclr and the net they drive resets the
// rest of the core asynchronously, while the watchdog request enters them
// through their D input; a lint tool reports that mix of synchronous and
// asynchronous use of one net, and it is intended. How the three reset
// sources combine is this design's choice; the document only names the
// por and mclr pins.
module hn07
  import hn07_pkg::*;
#(
  parameter int unsigned PC_W = 16
) (
  input  logic            clk,
  input  logic            por,
  input  logic            mclr,
  input  logic            clkwdt,
  input  logic [13:0]     prgdata,
  output logic [PC_W-1:0] prgaddr,
  input  logic            extint,
  input  logic            t0cki,
  input  logic            t1cki,
  input  logic            ccp1i,
  input  logic            rxdli,
  input  logic            rxcki,
  input  logic            wdte,
  input  logic [7:0]      port_in  [4],
  output logic [7:0]      port_out [4],
  output logic [7:0]      port_oe  [4],
  output logic            sleep,
  output logic            ccp1o,
  output logic            txdto,
  output logic            txcko
);
  // ---------------- reset ----------------
  logic       hard_rst_n, rst_n, wdt_to;
  logic [1:0] rst_sync;

  assign hard_rst_n = !(por || mclr);

  always_ff @(posedge clk or negedge hard_rst_n) begin
    if (!hard_rst_n)  rst_sync <= '0;
    else if (wdt_to)  rst_sync <= '0;
    else              rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];

  // ---------------- CPU and RAM ----------------
  raddr_t     ram_raddr, ram_waddr;
  daddr_t     sfr_raddr, sfr_waddr;
  logic [7:0] ram_rdata, ram_wdata, sfr_wdata, sfr_rdata;
  logic       ram_we, sfr_we, sfr_re;
  logic       irq, wake, irq_ack, retfie, clrwdt;

  hn07_cpu #(.PC_W(PC_W)) u_cpu (
    .clk, .rst_n, .prgaddr, .prgdata,
    .ram_raddr, .ram_rdata, .ram_we, .ram_waddr, .ram_wdata,
    .sfr_raddr, .sfr_rdata, .sfr_waddr, .sfr_wdata, .sfr_we, .sfr_re,
    .irq, .wake, .irq_ack, .retfie, .clrwdt, .sleep
  );

  hn07_dpram #(.DEPTH(512), .WIDTH(8)) u_ram (
    .clk, .raddr(ram_raddr), .rdata(ram_rdata),
    .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata)
  );

  // ---------------- peripherals ----------------
  localparam int unsigned NRD = 10;
  logic [7:0] rd [NRD];

  localparam daddr_t PORT_A [4] = '{A_PORTA, A_PORTB, A_PORTC, A_PORTD};
  localparam daddr_t TRIS_A [4] = '{A_TRISA, A_TRISB, A_TRISC, A_TRISD};

  for (genvar i = 0; i < 4; i++) begin : g_port
    hn07_ioport #(.PORT_ADDR(PORT_A[i]), .TRIS_ADDR(TRIS_A[i])) u_port (
      .clk, .rst_n, .sfr_raddr, .sfr_rdata(rd[i]), .sfr_waddr, .sfr_wdata, .sfr_we,
      .pin_in(port_in[i]), .pin_out(port_out[i]), .pin_oe(port_oe[i])
    );
  end

  logic        intedg, t0_ovf, t1_ovf, t2_match, t2_int, ccp_int, tmr1_clr;
  logic        tx_empty, rc_full;
  logic [15:0] tmr1;
  logic [7:0]  tmr2;
  logic [1:0]  pwm_frac;

  hn07_timer0 u_tmr0 (
    .clk, .rst_n, .sfr_raddr, .sfr_rdata(rd[4]), .sfr_waddr, .sfr_wdata, .sfr_we,
    .t0cki, .intedg, .t0_ovf
  );

  hn07_timer1 u_tmr1 (
    .clk, .rst_n, .sfr_raddr, .sfr_rdata(rd[5]), .sfr_waddr, .sfr_wdata, .sfr_we,
    .t1cki, .tmr1_clr, .tmr1, .t1_ovf
  );

  hn07_timer2 u_tmr2 (
    .clk, .rst_n, .sfr_raddr, .sfr_rdata(rd[6]), .sfr_waddr, .sfr_wdata, .sfr_we,
    .tmr2, .pwm_frac, .t2_match, .t2_int
  );

  hn07_ccp u_ccp (
    .clk, .rst_n, .sfr_raddr, .sfr_rdata(rd[7]), .sfr_waddr, .sfr_wdata, .sfr_we,
    .tmr1, .tmr2, .pwm_frac, .t2_match, .ccp1i, .ccp1o, .ccp_int, .tmr1_clr
  );

  hn07_usart u_usart (
    .clk, .rst_n, .sfr_raddr, .sfr_rdata(rd[8]), .sfr_waddr, .sfr_wdata, .sfr_we,
    .sfr_re, .rxdli, .rxcki, .txdto, .txcko, .tx_empty, .rc_full
  );

  logic [7:0] rd_intc, rd_wdt;

  hn07_wdt u_wdt (
    .clk, .rst_n(hard_rst_n), .clkwdt, .wdte,
    .sfr_raddr, .sfr_rdata(rd_wdt), .sfr_waddr, .sfr_wdata, .sfr_we,
    .clr(clrwdt), .timeout(wdt_to)
  );

  hn07_intc u_intc (
    .clk, .rst_n, .sfr_raddr, .sfr_rdata(rd_intc), .sfr_waddr, .sfr_wdata, .sfr_we,
    .extint, .intedg, .pchg_pins(port_in[1][7:4]),
    .t0_ovf, .t1_ovf, .t2_int, .ccp_int, .rc_full, .tx_empty,
    .irq_ack, .retfie, .irq, .wake
  );

  assign rd[9] = rd_intc | rd_wdt;

  always_comb begin
    sfr_rdata = 8'h00;
    for (int i = 0; i < NRD; i++) sfr_rdata |= rd[i];
  end
endmodule
