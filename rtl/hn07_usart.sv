// hn07_usart: USART with the three modes the document lists.
//
//   asynchronous    full duplex, 8N1 frames on txdto / rxdli, 16 baud-rate
//                   ticks per bit, receiver samples the middle of each bit;
//   synchronous master  half duplex, drives the bit clock on txcko, sends on
//                   txdto and receives on rxdli;
//   synchronous slave   half duplex, bit clock taken from rxcki.
// In both synchronous modes data changes after a falling clock edge and is
// sampled on the rising edge, least significant bit first, 8 bits per word.
//
// Baud-rate generator: a down-counter reloaded from SPBRG gives one tick
// every SPBRG+1 system clocks. Async bit time = 16 ticks; synchronous master
// clock half-period = 1 tick.
//
// Registers (PIC layout, this design's choice):
//   TXSTA 0x98: bit7 CSRC (1 = master), bit5 TXEN, bit4 SYNC, bit1 TRMT (ro)
//   RCSTA 0x18: bit7 SPEN, bit5 SREN (one sync master receive), bit4 CREN,
//               bit2 FERR (ro), bit1 OERR (ro)
//   SPBRG 0x99, TXREG 0x19 (write), RCREG 0x1A (read; the read retiring in
//   the CPU, sfr_re, empties the buffer).
// One transmit buffer in front of the shift register; one receive buffer
// behind it. tx_empty (TXIF) and rc_full (RCIF) are levels. A word completed
// while the receive buffer is full is dropped and sets OERR until CREN is
// cleared; a missing async stop bit sets FERR for that word, and the receiver
// then waits for the line to return high before it looks for a start bit.
module hn07_usart
  import hn07_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  daddr_t     sfr_raddr,
  output logic [7:0] sfr_rdata,
  input  daddr_t     sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic       sfr_we,
  input  logic       sfr_re,
  input  logic       rxdli,
  input  logic       rxcki,
  output logic       txdto,
  output logic       txcko,
  output logic       tx_empty,
  output logic       rc_full
);
  typedef enum logic [2:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP, RX_BREAK} rx_st_t;

  logic [7:0] txsta, rcsta, spbrg;
  logic [7:0] brg;
  logic       btick;
  logic       spen, sync_m, master, txen;
  // transmit
  logic [7:0] txb;
  logic       txb_full, tx_busy;
  logic [9:0] tsh;
  logic [3:0] tbits, tsub;
  // receive
  rx_st_t     rst_q;
  logic [7:0] rsh, rcb;
  logic       ferr, oerr, rc_ferr;
  logic [3:0] rbits, rsub;
  logic [2:0] rxd_s, rck_s;
  // synchronous clock
  logic       sclk, s_rise, s_fall, m_active;

  assign spen   = rcsta[7];
  assign sync_m = txsta[4];
  assign master = txsta[7];
  assign txen   = txsta[5];
  assign btick  = spen && brg == 8'h00;

  // master clock runs while a synchronous transfer is in progress
  assign m_active = sync_m && master &&
                    (tx_busy || (!txen && (rcsta[5] || rcsta[4]) && !rc_full));

  always_comb begin
    if (sync_m && !master) begin
      s_rise = rck_s[1] && !rck_s[2];
      s_fall = !rck_s[1] && rck_s[2];
    end else begin
      s_rise = m_active && btick && !sclk;
      s_fall = m_active && btick && sclk;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      txsta <= 8'h02; rcsta <= '0; spbrg <= '0; brg <= '0;
      txb <= '0; txb_full <= 1'b0; tx_busy <= 1'b0; tsh <= '1; tbits <= '0; tsub <= '0;
      rst_q <= RX_IDLE; rsh <= '0; rcb <= '0; rc_full <= 1'b0;
      ferr <= 1'b0; oerr <= 1'b0; rc_ferr <= 1'b0; rbits <= '0; rsub <= '0;
      rxd_s <= '1; rck_s <= '0; sclk <= 1'b0;
    end else begin
      rxd_s <= {rxd_s[1:0], rxdli};
      rck_s <= {rck_s[1:0], rxcki};
      brg   <= (brg == 8'h00) ? spbrg : brg - 8'd1;

      // ---------------- transmit ----------------
      if (!tx_busy && txb_full && txen && spen) begin
        tx_busy  <= 1'b1;
        txb_full <= 1'b0;
        tsub     <= '0;
        tbits    <= '0;
        tsh      <= sync_m ? {2'b11, txb} : {1'b1, txb, 1'b0};
      end else if (tx_busy && !sync_m) begin
        if (btick) begin
          tsub <= tsub + 4'd1;
          if (tsub == 4'hF) begin
            tsh   <= {1'b1, tsh[9:1]};
            tbits <= tbits + 4'd1;
            if (tbits == 4'd9) tx_busy <= 1'b0;
          end
        end
      end else if (tx_busy && sync_m && s_fall) begin
        tsh   <= {1'b1, tsh[9:1]};
        tbits <= tbits + 4'd1;
        if (tbits == 4'd7) tx_busy <= 1'b0;
      end

      // synchronous master clock
      if (!m_active)  sclk <= 1'b0;
      else if (btick) sclk <= !sclk;

      // ---------------- receive ----------------
      if (!sync_m) begin
        unique case (rst_q)
          RX_IDLE: if (rcsta[4] && spen && !rxd_s[2]) begin
            rst_q <= RX_START; rsub <= '0;
          end
          RX_START: if (btick) begin
            rsub <= rsub + 4'd1;
            if (rsub == 4'd7) begin
              if (rxd_s[2]) rst_q <= RX_IDLE;           // false start
              else begin rst_q <= RX_DATA; rsub <= '0; rbits <= '0; end
            end
          end
          RX_DATA: if (btick) begin
            rsub <= rsub + 4'd1;
            if (rsub == 4'hF) begin
              rsh   <= {rxd_s[2], rsh[7:1]};
              rbits <= rbits + 4'd1;
              if (rbits == 4'd7) rst_q <= RX_STOP;
            end
          end
          RX_STOP: if (btick) begin
            rsub <= rsub + 4'd1;
            if (rsub == 4'hF) begin
              rst_q <= rxd_s[2] ? RX_IDLE : RX_BREAK;
              if (rc_full) oerr <= 1'b1;
              else begin rcb <= rsh; rc_full <= 1'b1; rc_ferr <= !rxd_s[2]; end
            end
          end
          RX_BREAK: if (rxd_s[2]) rst_q <= RX_IDLE;     // wait for idle line
          default: rst_q <= RX_IDLE;
        endcase
      end else begin
        rst_q <= RX_IDLE;
        if (s_rise && !tx_busy && (rcsta[5] || rcsta[4] || !master)) begin
          rsh   <= {rxd_s[1], rsh[7:1]};
          rbits <= rbits + 4'd1;
          if (rbits == 4'd7) begin
            rbits <= '0;
            if (rc_full) oerr <= 1'b1;
            else begin rcb <= {rxd_s[1], rsh[7:1]}; rc_full <= 1'b1; rc_ferr <= 1'b0; end
            if (master) rcsta[5] <= 1'b0;               // single receive done
          end
        end
      end
      if (rc_full) ferr <= rc_ferr;

      // ---------------- registers ----------------
      if (sfr_re && sfr_waddr == A_RCREG) begin
        rc_full <= 1'b0;
        ferr    <= 1'b0;
      end
      if (sfr_we) begin
        if (sfr_waddr == A_TXREG) begin txb <= sfr_wdata; txb_full <= 1'b1; end
        if (sfr_waddr == A_TXSTA) txsta <= {sfr_wdata[7:2], 1'b0, sfr_wdata[0]};
        if (sfr_waddr == A_RCSTA) rcsta <= {sfr_wdata[7:3], 3'b000};
        if (sfr_waddr == A_SPBRG) begin spbrg <= sfr_wdata; brg <= sfr_wdata; end
        if (sfr_waddr == A_RCSTA && !sfr_wdata[4]) oerr <= 1'b0;
        if (sfr_waddr == A_RCSTA || sfr_waddr == A_TXSTA) rbits <= '0;
      end
    end
  end

  assign tx_empty = !txb_full;
  assign txdto    = (tx_busy && (sync_m || spen)) ? tsh[0] : !sync_m;
  assign txcko    = sync_m && master && sclk;

  always_comb begin
    unique case (sfr_raddr)
      A_TXSTA: sfr_rdata = {txsta[7:2], !tx_busy, txsta[0]};
      A_RCSTA: sfr_rdata = {rcsta[7:3], ferr, oerr, 1'b0};
      A_SPBRG: sfr_rdata = spbrg;
      A_RCREG: sfr_rdata = rcb;
      default: sfr_rdata = 8'h00;
    endcase
  end
endmodule
