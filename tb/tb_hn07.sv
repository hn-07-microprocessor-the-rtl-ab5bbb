// tb_hn07: end-to-end test of the HN-07 chip at its default parameters.
//
// A program (built with hn07_asm_pkg into a behavioural program memory)
// configures the ports, Timer0/1/2, CCP1 in PWM mode, the USART (async, with
// txdto looped back to rxdli here) and the interrupt controller; sends a
// byte and takes the receive interrupt, which copies the byte to port b;
// counts Timer0 interrupts; sums 1..10 in a DECFSZ loop onto port c; reads
// a RETLW table through a computed jump (ADDWF PCL); sleeps and is woken by
// extint; writes the table value to port d. A second phase, started by port
// a pin 0, captures Timer1 on a ccp1i edge, runs a compare with the special
// event that clears Timer1, waits for the port b change flag, switches the
// USART to synchronous master and sends 0xC3 (sampled here on txcko), and
// writes 0xEE to port d. Finally the watchdog (wdte raised here) resets the
// chip since the program stops clearing it.
// Every mechanism is counted and must occur at least once: operand bypass
// from write-back and from the last retired write, taken skips, held jumps,
// taken jumps/calls/returns, PCL redirects, interrupts, sleep and wake-up,
// Timer0/Timer1/Timer2 events, USART transmit and receive, PWM output,
// capture, compare and its special event, port b change, USART mode switch,
// watchdog reset.
`timescale 1ns/1ps
module tb_hn07;
  import hn07_pkg::*;
  import hn07_asm_pkg::*;

  logic clk = 1'b0, clkwdt = 1'b0;
  always #5  clk    = !clk;
  always #15 clkwdt = !clkwdt;

  logic        por = 1'b1, mclr = 1'b0, extint = 1'b0, t0cki = 1'b0, t1cki = 1'b0;
  logic        ccp1i = 1'b0, rxcki = 1'b0, wdte = 1'b0;
  logic [15:0] prgaddr;
  logic [13:0] prgdata;
  logic [7:0]  port_in [4], port_out [4], port_oe [4];
  logic        sleep, ccp1o, txdto, txcko;

  logic [13:0] rom [1024];
  assign prgdata = rom[prgaddr[9:0]];

  // driven pins read back their own value; inputs read ext_in
  logic [7:0]  ext_in [4];
  always_comb
    for (int i = 0; i < 4; i++)
      port_in[i] = (port_oe[i] & port_out[i]) | (~port_oe[i] & ext_in[i]);

  hn07 dut (
    .clk, .por, .mclr, .clkwdt, .prgdata, .prgaddr, .extint, .t0cki, .t1cki, .ccp1i,
    .rxdli(txdto), .rxcki, .wdte, .port_in, .port_out, .port_oe, .sleep, .ccp1o,
    .txdto, .txcko
  );

  // ---------------- mechanism counters ----------------
  int n_fwd_wb, n_fwd_lr, n_skip, n_stall, n_cti, n_pcl, n_irq, n_sleep, n_wake;
  int n_t0, n_t1, n_t2, n_tx, n_rx, n_pwm_hi, n_wdt, n_portb, n_cyc, n_retired;
  int n_cap, n_cmp, n_t1clr, n_rbif, n_sync;
  logic sleep_q = 1'b0, rc_q = 1'b0, txb_q = 1'b0, rbif_q = 1'b0, sync_q = 1'b0;
  initial begin
    n_fwd_wb = 0; n_fwd_lr = 0; n_skip = 0; n_stall = 0; n_cti = 0; n_pcl = 0; n_irq = 0;
    n_sleep = 0; n_wake = 0; n_t0 = 0; n_t1 = 0; n_t2 = 0; n_tx = 0; n_rx = 0;
    n_pwm_hi = 0; n_wdt = 0; n_portb = 0; n_cyc = 0; n_retired = 0;
    n_cap = 0; n_cmp = 0; n_t1clr = 0; n_rbif = 0; n_sync = 0;
  end
  always @(posedge clk) begin
    if (dut.rst_n && !por) begin
      n_cyc++;
      if (dut.u_cpu.ex_v && dut.u_cpu.fwd_wb) n_fwd_wb++;
      if (dut.u_cpu.ex_v && dut.u_cpu.fwd_lr && !dut.u_cpu.fwd_wb) n_fwd_lr++;
      if (dut.u_cpu.skip_taken) n_skip++;
      if (dut.u_cpu.stall_ad)   n_stall++;
      if (dut.u_cpu.cti_take)   n_cti++;
      if (dut.u_cpu.wb_pcl)     n_pcl++;
      if (dut.u_cpu.irq_take)   n_irq++;
      if (dut.u_cpu.wb_v)       n_retired++;
      if (sleep && !sleep_q)    n_sleep++;
      if (!sleep && sleep_q)    n_wake++;
      if (dut.t0_ovf) n_t0++;
      if (dut.t1_ovf) n_t1++;
      if (dut.t2_int) n_t2++;
      if (dut.u_usart.tx_busy && !txb_q) n_tx++;
      if (dut.rc_full && !rc_q) n_rx++;
      if (ccp1o) n_pwm_hi++;
      if (dut.sfr_we && dut.sfr_waddr == A_PORTB) n_portb++;
      if (dut.ccp_int && dut.u_ccp.is_cap) n_cap++;
      if (dut.ccp_int && dut.u_ccp.is_cmp) n_cmp++;
      if (dut.tmr1_clr) n_t1clr++;
      if (dut.u_intc.intcon[0] && !rbif_q) n_rbif++;
      if (dut.u_usart.sync_m && !sync_q) n_sync++;
      sleep_q <= sleep; rc_q <= dut.rc_full; txb_q <= dut.u_usart.tx_busy;
      rbif_q <= dut.u_intc.intcon[0]; sync_q <= dut.u_usart.sync_m;
    end
    if (dut.wdt_to && dut.hard_rst_n) n_wdt++;
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask
  task automatic check_range(input string what, input int got, input int lo, input int hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d..%0d", what, got, lo, hi);
    end
  endtask
  task automatic happened(input string what, input int n);
    checks++;
    if (n < 1) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  int pc;
  task automatic emit(input insn_t i); rom[pc] = i; pc++; endtask

  localparam logic [6:0] STATUS = 7'h03, PCL = 7'h02, PCLATH = 7'h0A, INTCON = 7'h0B,
                         PIR1 = 7'h0C, PORTB = 7'h06, PORTC = 7'h07, PORTD = 7'h08,
                         TMR1H = 7'h0F, T1CON = 7'h10, T2CON = 7'h12, CCPR1L = 7'h15,
                         CCP1CON = 7'h17, RCSTA = 7'h18, TXREG = 7'h19, RCREG = 7'h1A,
                         PORTA = 7'h05, TMR1L = 7'h0E, CCPR1H = 7'h16;
  int isr_t0, isr_end, loop_a, wrx, wt0, fe, wgo, wcap, wcmp, wrb, wtx;

  initial begin
    for (int i = 0; i < 1024; i++) rom[i] = NOP();
    pc = 0; emit(GOTO(16'h010));
    // ---- interrupt service routine ----
    pc = 4;
    isr_t0 = 9; isr_end = 13;
    emit(BTFSS(PIR1, 5)); emit(GOTO(isr_t0));
    emit(MOVF(RCREG, W)); emit(MOVWF(7'h60)); emit(MOVWF(PORTB));
    pc = isr_t0;
    emit(BTFSS(INTCON, 2)); emit(GOTO(isr_end));
    emit(BCF(INTCON, 2)); emit(INCF(7'h61, F));
    pc = isr_end;
    emit(RETFIE());
    // ---- main ----
    pc = 16'h010;
    emit(CLRF(7'h60)); emit(CLRF(7'h61));
    emit(BSF(STATUS, 5)); emit(NOP()); emit(NOP()); emit(NOP());   // bank 1
    emit(CLRF(7'h06)); emit(CLRF(7'h07)); emit(CLRF(7'h08));          // TRISB/C/D outputs
    emit(MOVLW(8'h40)); emit(MOVWF(7'h01));                          // OPTION: INTEDG, 1:2
    emit(MOVLW(8'h20)); emit(MOVWF(7'h0C));                          // PIE1: RCIE
    emit(MOVLW(8'd63)); emit(MOVWF(7'h12));                          // PR2
    emit(MOVLW(8'd1));  emit(MOVWF(7'h19));                          // SPBRG
    emit(MOVLW(8'h20)); emit(MOVWF(7'h18));                          // TXSTA: TXEN
    emit(MOVLW(8'h02)); emit(MOVWF(7'h17));                          // WDTCON
    emit(BCF(STATUS, 5)); emit(NOP()); emit(NOP()); emit(NOP());   // bank 0
    emit(MOVLW(8'h90)); emit(MOVWF(RCSTA));                          // SPEN, CREN
    emit(MOVLW(8'h10)); emit(MOVWF(CCPR1L));                         // duty 64/256
    emit(MOVLW(8'h0C)); emit(MOVWF(CCP1CON));                        // PWM
    emit(MOVLW(8'h05)); emit(MOVWF(T2CON));                          // on, 1:4
    emit(MOVLW(8'hFF)); emit(MOVWF(TMR1H));
    emit(MOVLW(8'h01)); emit(MOVWF(T1CON));
    emit(MOVLW(8'hE0)); emit(MOVWF(INTCON));                         // GIE PEIE T0IE
    emit(MOVLW(8'h5A)); emit(MOVWF(TXREG));
    emit(MOVWF(7'h65)); emit(NOP()); emit(INCF(7'h65, F));           // i-2 dependence
    emit(CLRF(7'h62)); emit(MOVLW(8'd10)); emit(MOVWF(7'h63));
    loop_a = pc;
    emit(MOVF(7'h63, W)); emit(ADDWF(7'h62, F)); emit(DECFSZ(7'h63, F)); emit(GOTO(loop_a));
    emit(MOVF(7'h62, W)); emit(MOVWF(PORTC));
    wrx = pc;
    emit(MOVF(7'h60, W)); emit(BTFSC(STATUS, 2)); emit(GOTO(wrx));
    wt0 = pc;
    emit(MOVLW(8'd2)); emit(SUBWF(7'h61, W)); emit(BTFSS(STATUS, 0)); emit(GOTO(wt0));
    emit(MOVLW(8'h01)); emit(MOVWF(PCLATH)); emit(MOVLW(8'd2));
    emit(CALL(16'h100)); emit(MOVWF(7'h64));
    emit(MOVLW(8'h00)); emit(MOVWF(PCLATH));
    emit(BCF(INTCON, 7)); emit(BCF(INTCON, 5)); emit(BSF(INTCON, 4));
    emit(CLRWDT()); emit(SLEEP()); emit(NOP());
    emit(BCF(INTCON, 1));
    emit(MOVF(7'h64, W)); emit(MOVWF(PORTD));
    // ---- second phase, started by port a pin 0 ----
    wgo = pc;
    emit(BTFSS(PORTA, 0)); emit(GOTO(wgo));
    // capture Timer1 on a rising ccp1i edge
    emit(BCF(PIR1, 2)); emit(MOVLW(8'h05)); emit(MOVWF(CCP1CON));
    wcap = pc;
    emit(BTFSS(PIR1, 2)); emit(GOTO(wcap));
    emit(MOVF(CCPR1L, W)); emit(MOVWF(7'h66)); emit(MOVF(CCPR1H, W)); emit(MOVWF(7'h67));
    // compare with special event at Timer1 = 0x0200
    emit(CLRF(T1CON)); emit(CLRF(TMR1H)); emit(CLRF(TMR1L));
    emit(MOVLW(8'h02)); emit(MOVWF(CCPR1H)); emit(CLRF(CCPR1L));
    emit(MOVLW(8'h0B)); emit(MOVWF(CCP1CON)); emit(BCF(PIR1, 2));
    emit(MOVLW(8'h01)); emit(MOVWF(T1CON));
    wcmp = pc;
    emit(BTFSS(PIR1, 2)); emit(GOTO(wcmp));
    // port b change flag
    emit(BCF(INTCON, 0)); emit(MOVLW(8'hF0)); emit(MOVWF(PORTB));
    wrb = pc;
    emit(BTFSS(INTCON, 0)); emit(GOTO(wrb));
    // USART: switch to synchronous master and send one byte
    emit(MOVLW(8'h80)); emit(MOVWF(RCSTA));                          // SPEN only
    emit(BSF(STATUS, 5)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(MOVLW(8'hB0)); emit(MOVWF(7'h18));                          // TXSTA: CSRC TXEN SYNC
    emit(BCF(STATUS, 5)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(MOVLW(8'hC3)); emit(MOVWF(TXREG));
    emit(BSF(STATUS, 5)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(NOP()); emit(NOP());
    wtx = pc;
    emit(BTFSS(7'h18, 1)); emit(GOTO(wtx));                          // TRMT
    emit(BCF(STATUS, 5)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(MOVLW(8'hEE)); emit(MOVWF(PORTD));
    fe = pc; emit(GOTO(fe));
    // ---- table ----
    pc = 16'h100;
    emit(ADDWF(PCL, F)); emit(RETLW(8'h11)); emit(RETLW(8'h22)); emit(RETLW(8'h33));

    for (int i = 0; i < 4; i++) ext_in[i] = '0;
    repeat (3) @(posedge clk);
    por = 1'b0;
    wait (sleep);
    check("port c: sum 1..10", int'(port_out[2]), 55);
    check("port b: byte received", int'(port_out[1]), 8'h5A);
    check("RAM: received byte", int'(dut.u_ram.mem[int'(ram_index(10'h60))]), 8'h5A);
    check("port d before wake", int'(port_out[3]), 0);
    repeat (30) @(posedge clk);
    check("still asleep", int'(sleep), 1);
    extint = 1'b1; repeat (10) @(posedge clk); extint = 1'b0;
    wait (port_out[3] != 8'h00);
    check("port d: table value", int'(port_out[3]), 8'h33);
    check("port d direction", int'(port_oe[3]), 8'hFF);
    check("RAM: i-2 bypass", int'(dut.u_ram.mem[int'(ram_index(10'h65))]), 8'h5B);
    check("timer0 interrupts counted", int'(dut.u_ram.mem[int'(ram_index(10'h61))] >= 2), 1);
    // PWM duty over ten periods (period 256 clocks)
    begin
      int hi = 0;
      repeat (2560) begin @(posedge clk); hi += int'(ccp1o); end
      check("pwm duty 64/256 over 10 periods", hi, 640);
    end
    // second phase
    begin
      int t1_at;
      logic [7:0] sd;
      int sclk;
      ext_in[0][0] = 1'b1;
      wait (dut.u_ccp.is_cap);
      repeat (20) @(posedge clk);
      @(negedge clk); t1_at = int'(dut.tmr1); ccp1i = 1'b1;
      repeat (10) @(posedge clk); ccp1i = 1'b0;
      sclk = 0; sd = '0;
      fork
        begin
          wait (dut.u_usart.sync_m);
          while (sclk < 8) begin @(posedge txcko); sd[sclk] = txdto; sclk++; end
        end
        wait (port_out[3] == 8'hEE);
      join
      repeat (20) @(posedge clk);
      check_range("capture: Timer1 value at the ccp1i edge",
                  int'({dut.u_ram.mem[int'(ram_index(10'h67))], dut.u_ram.mem[int'(ram_index(10'h66))]}) - t1_at, 2, 4);
      check_range("compare special event clears Timer1", n_t1clr, 1, 100);
      check_range("Timer1 restarted after special event", int'(dut.tmr1), 1, 1000);
      check("sync master byte", int'(sd), 8'hC3);
      check("sync master clocks", sclk, 8);
      check("port b value", int'(port_out[1]), 8'hF0);
    end
    // let the watchdog expire
    wdte = 1'b1;
    wait (n_wdt == 1);
    repeat (5) @(posedge clk);
    check("watchdog reset clears port d", int'(port_out[3]), 0);
    repeat (40) @(posedge clk);
    check("restarted from reset vector", int'(prgaddr < 16'h040 && prgaddr > 16'h010), 1);

    $display("mechanisms:");
    happened("bypass from write-back", n_fwd_wb);
    happened("bypass from last write", n_fwd_lr);
    happened("taken skip", n_skip);
    happened("held jump (stall)", n_stall);
    happened("jump/call/return", n_cti);
    happened("PCL redirect", n_pcl);
    happened("interrupt", n_irq);
    happened("sleep", n_sleep);
    happened("wake-up", n_wake);
    happened("timer0 overflow", n_t0);
    happened("timer1 overflow", n_t1);
    happened("timer2 interrupt", n_t2);
    happened("usart transmit", n_tx);
    check("two usart transmissions (async, sync)", n_tx, 2);
    happened("usart receive", n_rx);
    happened("pwm high clocks", n_pwm_hi);
    happened("watchdog reset", n_wdt);
    happened("port b write", n_portb);
    happened("capture", n_cap);
    happened("compare", n_cmp);
    happened("compare special event", n_t1clr);
    happened("port b change flag", n_rbif);
    happened("usart mode switch to sync", n_sync);
    $display("  cycles %0d, instructions retired %0d", n_cyc, n_retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
