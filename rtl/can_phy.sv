// can_phy: CAN physical layer as one serialized activity thread.
//
// The layer sends and receives single bits on the CAN bus and does the
// low-level bit timing, bit stuffing and synchronization. Its SDL model has
// the processes Clock, Timing, Synchronization, Bit-Stuffing, Receiver,
// Transmitter and Controller; here they are merged into one sequential
// thread that starts on every controller tick:
//   Clock           an SDL timer (sdl_timer) re-armed on every expiry emits
//                   ctrl_clock once every controller_period clock cycles.
//   Timing          counts TICKS_PER_BIT ticks per bit; tick 0 is can_clock
//                   (a new bit starts), tick SAMPLE_TICK is sample_now.
//   Transmitter     on can_clock drives tx_level: a stuff bit if one is due,
//                   else the next bit 'tx' from the data link layer (and
//                   pulses tx_taken), else recessive (1).
//   Receiver        on sample_now samples bus_level and, unless the bit is a
//                   stuff bit, passes it up as rx with rx_valid.
//   Bit-Stuffing    between start_stuff and reset_stuff counts equal bits on
//                   the bus; after five equal bits it raises stuff_now, so
//                   the next bit is a complementary stuff bit that the
//                   Receiver drops; a sixth equal bit instead is a stuff
//                   error (error).
//   Synchronization reports every recessive-to-dominant edge (rx_edge) and,
//                   once armed by rx_sync (or by a wake-up), hard-
//                   synchronizes: the tick of the edge becomes tick 0 of
//                   the bit. Any other edge resynchronizes. The bus is
//                   looked at once per tick, so an edge made at tick 0 is
//                   seen at tick 1, and ticks 0 and 1 count as in phase.
//                   An edge seen at ticks 2..SAMPLE_TICK is late by
//                   (tick - 1): the bit is lengthened by that much, at most
//                   SJW ticks, which delays the sample point. An edge seen
//                   after the sample point belongs to the next bit, which
//                   comes early: the bit is shortened by at most SJW ticks.
//                   seg tells the bit segment of the current tick (0 sync,
//                   1 before the sample point, 2 from the sample point on).
//   Controller      reset restarts timing and stuffing; sleep stops the
//                   Clock until a dominant edge on the bus, which raises
//                   awoken for one cycle and restarts it.
// Thread timing: the tick is taken in cycle 1 (Timing), the can_clock or
// sample_now branch runs in cycle 2, bit stuffing in cycle 3 and the
// Receiver's output in cycle 4, so rx_valid rises four clock cycles after
// ctrl_clock, and controller_period must be at least 4 for the thread to
// finish before the next tick. The process structure, the signal names,
// the 8 ticks per bit and the 4-cycle path are the document's; the bit
// stuffing and synchronization rules are CAN's. The sample point, the
// resynchronization jump width (SJW = 1 tick), the port handshakes, the
// sleep and wake-up behaviour and all widths are this design's own
// choices.
module can_phy #(
  parameter int unsigned TICKS_PER_BIT = 8,
  parameter int unsigned SAMPLE_TICK   = 6,
  parameter int unsigned SJW           = 1,
  parameter int unsigned PW            = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // Clock
  input  logic [PW-1:0] controller_period,
  // Controller
  input  logic          reset,
  input  logic          sleep,
  input  logic          rx_sync,
  output logic          awoken,
  // Bit-Stuffing control from the data link layer (via the Controller)
  input  logic          start_stuff,
  input  logic          reset_stuff,
  // data link layer
  input  logic          tx_valid,
  input  logic          tx,
  output logic          tx_taken,
  output logic          rx_valid,
  output logic          rx,
  // bus
  input  logic          bus_level,
  output logic          tx_level,
  // Synchronization
  output logic          rx_edge,
  output logic          error,
  output logic [1:0]    seg,
  // internal signals of the thread, for observation
  output logic          ctrl_clock,
  output logic          can_clock,
  output logic          sample_now,
  output logic          stuff_now
);

  localparam int unsigned TQW = $clog2(TICKS_PER_BIT);

  typedef enum logic [1:0] {TH_IDLE, TH_BRANCH, TH_STUFF, TH_OUT} th_state_e;

  th_state_e      st;
  logic [TQW-1:0] tq;           // Timing: tick within the bit
  logic           do_can, do_sample;
  logic           asleep, sync_armed, prev_level;
  logic           stuff_on, stuff_due, drop;
  logic [2:0]     run_len;
  logic           last_bit, rx_bit;
  logic           tmr_set, tmr_cancel, tmr_active, tmr_valid;
  logic           tmr_sig;
  logic           bus_q;

  // Clock: a re-armed SDL timer
  assign tmr_set    = (tmr_valid && !asleep) || (!tmr_active && !asleep);
  assign tmr_cancel = asleep;

  sdl_timer #(.TW(PW), .W(1)) u_clock (
    .clk, .rst_n, .tick(1'b1), .set(tmr_set), .cancel(tmr_cancel),
    .duration(controller_period - 1'b1), .sig(1'b1),
    .out_valid(tmr_valid), .out_data(tmr_sig), .out_ready(st == TH_IDLE),
    .active(tmr_active)
  );

  assign ctrl_clock = tmr_valid && tmr_sig && (st == TH_IDLE);

  always_comb begin
    if (tq == '0)                        seg = 2'd0;
    else if (int'(tq) < SAMPLE_TICK)     seg = 2'd1;
    else                                 seg = 2'd2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || reset) begin
      st         <= TH_IDLE;
      tq         <= TQW'(TICKS_PER_BIT - 1);
      do_can     <= 1'b0;
      do_sample  <= 1'b0;
      asleep     <= 1'b0;
      sync_armed <= 1'b0;
      prev_level <= 1'b1;
      stuff_on   <= 1'b0;
      stuff_due  <= 1'b0;
      drop       <= 1'b0;
      run_len    <= '0;
      last_bit   <= 1'b1;
      rx_bit     <= 1'b1;
      bus_q      <= 1'b1;
      tx_level   <= 1'b1;
      tx_taken   <= 1'b0;
      rx_valid   <= 1'b0;
      rx         <= 1'b1;
      rx_edge    <= 1'b0;
      error      <= 1'b0;
      awoken     <= 1'b0;
      can_clock  <= 1'b0;
      sample_now <= 1'b0;
      stuff_now  <= 1'b0;
    end else begin
      tx_taken   <= 1'b0;
      rx_valid   <= 1'b0;
      rx_edge    <= 1'b0;
      error      <= 1'b0;
      awoken     <= 1'b0;
      can_clock  <= 1'b0;
      sample_now <= 1'b0;
      stuff_now  <= 1'b0;
      if (rx_sync) sync_armed <= 1'b1;
      if (start_stuff) begin
        stuff_on  <= 1'b1;
        stuff_due <= 1'b0;
        run_len   <= '0;
      end else if (reset_stuff) begin
        stuff_on  <= 1'b0;
        stuff_due <= 1'b0;
      end

      // Controller: sleep until a dominant edge on the bus
      bus_q <= bus_level;
      if (sleep) asleep <= 1'b1;
      if (asleep && bus_q && !bus_level) begin
        asleep     <= 1'b0;
        awoken     <= 1'b1;
        sync_armed <= 1'b1;
      end

      case (st)
        TH_IDLE: if (ctrl_clock) begin
          // Timing and edge detection (Synchronization)
          logic [TQW-1:0] nq;
          nq = (int'(tq) == TICKS_PER_BIT - 1) ? '0 : tq + 1'b1;
          prev_level <= bus_level;
          if (prev_level && !bus_level) begin
            rx_edge <= 1'b1;
            if (sync_armed) begin
              // hard synchronization
              nq         = '0;
              sync_armed <= 1'b0;
            end else if (int'(nq) >= 2 && int'(nq) <= SAMPLE_TICK) begin
              // resynchronization, edge late: lengthen the bit
              nq = nq - TQW'(((int'(nq) - 1) < SJW) ? (int'(nq) - 1) : SJW);
            end else if (int'(nq) > SAMPLE_TICK) begin
              // resynchronization, edge early: shorten the bit
              if (int'(nq) + SJW >= TICKS_PER_BIT) nq = '0;
              else                                 nq = nq + TQW'(SJW);
            end
          end
          tq         <= nq;
          do_can     <= (nq == '0);
          do_sample  <= (int'(nq) == SAMPLE_TICK);
          can_clock  <= (nq == '0);
          sample_now <= (int'(nq) == SAMPLE_TICK);
          if (nq == '0 || int'(nq) == SAMPLE_TICK) st <= TH_BRANCH;
        end
        TH_BRANCH: begin
          if (do_can) begin
            // Transmitter
            if (stuff_due)      tx_level <= ~last_bit;
            else if (tx_valid) begin
              tx_level <= tx;
              tx_taken <= 1'b1;
            end else            tx_level <= 1'b1;
          end
          if (do_sample) begin
            // Receiver samples the bus
            rx_bit <= bus_level;
            st     <= TH_STUFF;
          end else begin
            st <= TH_IDLE;
          end
        end
        TH_STUFF: begin
          // Bit-Stuffing
          drop <= 1'b0;
          if (stuff_on) begin
            if (stuff_due) begin
              drop      <= 1'b1;
              stuff_due <= 1'b0;
              if (rx_bit == last_bit) error <= 1'b1;
              run_len  <= 3'd1;
              last_bit <= rx_bit;
            end else begin
              logic [2:0] n;
              n = (rx_bit == last_bit) ? run_len + 1'b1 : 3'd1;
              run_len  <= n;
              last_bit <= rx_bit;
              if (n == 3'd5) begin
                stuff_due <= 1'b1;
                stuff_now <= 1'b1;
              end
            end
          end else begin
            last_bit <= rx_bit;
          end
          st <= TH_OUT;
        end
        TH_OUT: begin
          // Receiver passes the bit up unless it was a stuff bit
          if (!drop) begin
            rx       <= rx_bit;
            rx_valid <= 1'b1;
          end
          st <= TH_IDLE;
        end
        default: st <= TH_IDLE;
      endcase
    end
  end

endmodule
