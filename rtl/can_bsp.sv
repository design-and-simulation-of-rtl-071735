// can_bsp: bit stream processor.
// Turns a message from the transmit buffer into a CAN data or remote frame and turns the frames
// seen on the bus back into messages. It works one bus bit at a time: at every sample_point of
// the bit timing logic it takes sampled_bit, and at every tx_point it drives the next bit on tx.
//
// Frame layout (standard / extended):
//   SOF, ID[10:0], RTR, IDE=0, r0, DLC[3:0], data, CRC[14:0], CRC delim, ACK slot, ACK delim,
//   EOF (7 recessive), intermission (3 recessive)
//   SOF, ID[28:18], SRR=1, IDE=1, ID[17:0], RTR, r1, r0, DLC[3:0], data, CRC ... as above
// The receive side follows the fields with a state machine and a bit counter; this is the frame
// generator, which indexes the stream from the SOF on. Bits from SOF to the end of the CRC
// sequence are stuffed (can_stuff); the CRC (can_crc) covers SOF to the last data bit. Data
// bytes pass through an 8-bit receive shift register that fills from the top; can_ibo puts them
// back in bit order. The transmit shift register holds the frame from the identifier to the last
// data bit, most significant bit first, and shifts once per non-stuff bit.
//
// Every node receives every frame, including its own. A node that starts a frame is the
// transmitter. During the arbitration field (identifier, SRR, IDE, RTR) it compares each bit it
// sends with the bus: recessive sent but dominant seen means arbitration is lost and the node
// goes on as a receiver; its request stays pending and is retried when the bus is idle.
// Errors detected: bit error (sent level not seen outside arbitration and ACK slot), stuff error
// (six equal bits), CRC error (receiver, reported after the ACK delimiter), form error (dominant
// CRC delimiter, ACK delimiter or EOF bit) and ACK error (transmitter sees no acknowledgement).
// An error starts an error frame at the next bit: six dominant bits for an error-active node,
// six recessive for an error-passive one, then the node waits for a recessive bit and for seven
// more (the delimiter) before the intermission. One-clock pulses tell the error management
// logic which counter to step.
// Overload frames: a dominant bit in the first or second intermission bit, or (for a receiver)
// in the last EOF bit, starts an overload frame: six dominant bits, whatever the error state,
// then the same wait and delimiter as an error frame; no counter changes (go_overload_frame
// pulses). A dominant third intermission bit is a start of frame.
// Suspend transmission: an error-passive node that sent the last frame waits 8 more recessive
// bits after the intermission before it may start again; another node may start meanwhile.
// A receiver that finds the CRC correct drives the ACK slot dominant. After the sixth EOF bit a
// received message is valid; if the acceptance filter accepted it, its bytes are written to the
// receive FIFO in buffer layout (frame info, 2 or 4 identifier bytes, data) over the next clocks
// and the message is closed with fifo_commit. In self_test mode a transmitter needs no ACK and
// keeps its own message too. After reset, leaving reset_mode or bus-off recovery the node waits
// for 11 recessive bits before it takes part. While bus-off it counts sequences of 11 recessive
// bits for the error management logic.
//
// What follows the controller's description: the task list (arbitration by bit comparison,
// stuffing and destuffing, framing, CRC generation and check, error detection), the
// arbitration state diagram and the ACK/EOF rules. This design's own choices: the state
// encoding, the buffer byte layout, the write-after-EOF FIFO handshake and the self-test mode.
// The overload frame (named by the controller's go_overload_frame signal), the error flag and
// delimiter lengths and the suspend-transmission time are those of the CAN protocol.
module can_bsp
  import can_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        reset_mode,
  input  logic        self_test,
  // bit timing logic
  input  logic        sample_point,
  input  logic        sampled_bit,
  input  logic        tx_point,
  output logic        tx,
  output logic        hard_sync_enable,
  output logic        transmitting,
  // transmit buffer
  input  logic        tx_request,
  input  can_frame_t  tx_frame,
  output logic        tx_pending,
  output logic        tx_done,
  // acceptance filter
  output logic [28:0] rx_id,
  output logic        rx_ide,
  output logic        rx_rtr,
  output logic [7:0]  rx_data0,
  output logic [7:0]  rx_data1,
  output logic        rx_no_byte0,
  output logic        rx_no_byte1,
  output logic        go_rx_crc_lim,
  output logic        go_rx_inter,
  output logic        go_error_frame,
  output logic        go_overload_frame,
  input  logic        id_ok,
  // receive FIFO
  output logic        fifo_wr,
  output logic [7:0]  fifo_data,
  output logic        fifo_commit,
  // error management logic
  input  logic        node_error_passive,
  input  logic        node_bus_off,
  output logic        tx_error,
  output logic        rx_error,
  output logic        tx_success,
  output logic        rx_success,
  output logic        recessive_11,
  // status and events
  output logic        receiving,
  output logic        arb_lost,
  output logic        bit_error,
  output logic        stuff_error,
  output logic        crc_error,
  output logic        form_error,
  output logic        ack_error,
  output logic        stuff_bit
);

  typedef enum logic [4:0] {
    ST_WAIT_IDLE, ST_IDLE, ST_ID_A, ST_RTR1, ST_IDE, ST_ID_B, ST_RTR2, ST_R1, ST_R0, ST_DLC,
    ST_DATA, ST_CRC, ST_CRC_DELIM, ST_ACK_SLOT, ST_ACK_DELIM, ST_EOF, ST_INTER,
    ST_ERR_FLAG, ST_ERR_WAIT, ST_ERR_DELIM, ST_BUS_OFF, ST_OVL_FLAG
  } state_t;

  localparam int unsigned TXW = 104;   // 38 header bits + 64 data bits, rounded up

  state_t      state;
  logic [5:0]  bitcnt;          // bit index within the current field
  logic [3:0]  bytecnt;         // data bytes received
  logic [3:0]  nbytes;          // data bytes this frame carries
  logic        transmitter;     // this node sends the current frame
  logic        tx_next;
  logic [TXW-1:0] tx_shift;     // transmit register
  logic [6:0]  rx_shift;        // receive register (first seven bits of a byte)
  logic [7:0]  rx_byte;
  logic [10:0] id_a;
  logic [17:0] id_b;
  logic [3:0]  dlc;
  logic [7:0]  rx_data [8];
  logic [13:0] rx_crc;           // CRC bits received so far
  logic        rx_ide_q, rx_rtr1, rx_rtr2;
  logic        crc_ok;
  logic        accept;          // id_ok latched for the FIFO write
  logic        last_tx;         // this node sent (or tried to send) the last frame
  logic [3:0]  suspend;         // suspend-transmission bits still to wait

  // FIFO write sequencer
  logic        wseq_busy;
  logic [3:0]  wseq_idx;
  logic [3:0]  wseq_len;
  logic [7:0]  wseq_byte;

  // stuffing
  logic        in_stuff_region, stuff_start, stuff_clear;
  logic        stuff_now, stuff_val, stuff_err;

  // CRC
  logic [14:0] crc_val;
  logic        crc_init, crc_en;

  logic        b, sp, is_arb_field, in_frame, err_now;

  assign b  = sampled_bit;
  assign sp = sample_point && !reset_mode;

  assign in_stuff_region = state inside {ST_ID_A, ST_RTR1, ST_IDE, ST_ID_B, ST_RTR2, ST_R1,
                                         ST_R0, ST_DLC, ST_DATA, ST_CRC, ST_CRC_DELIM};
  assign is_arb_field    = state inside {ST_ID_A, ST_RTR1, ST_IDE, ST_ID_B, ST_RTR2};
  assign in_frame        = in_stuff_region || state inside {ST_ACK_SLOT, ST_ACK_DELIM, ST_EOF};
  assign stuff_start     = (state inside {ST_IDLE, ST_INTER}) && !b;
  assign stuff_clear     = reset_mode || !(in_stuff_region || stuff_start);

  can_stuff u_stuff (
    .clk        (clk),
    .rst        (rst),
    .clear      (stuff_clear),
    .start      (stuff_start),
    .enable     (in_stuff_region),
    .bit_valid  (sp),
    .bit_in     (b),
    .stuff_next (stuff_now),
    .stuff_value(stuff_val),
    .stuff_error(stuff_err)
  );

  // The CRC covers SOF .. last data bit, stuff bits excluded.
  assign crc_init = state inside {ST_WAIT_IDLE, ST_IDLE, ST_INTER, ST_BUS_OFF}
                    && !(sp && stuff_start);
  assign crc_en   = sp && (stuff_start
                    || (state inside {ST_ID_A, ST_RTR1, ST_IDE, ST_ID_B, ST_RTR2, ST_R1,
                                      ST_R0, ST_DLC, ST_DATA} && !stuff_now));

  can_crc u_crc (
    .clk       (clk),
    .data      (b),
    .enable    (crc_en),
    .initialize(crc_init),
    .crc       (crc_val)
  );

  can_ibo #(.WIDTH(8)) u_ibo (.di({b, rx_shift}), .dout(rx_byte));

  assign hard_sync_enable = state inside {ST_WAIT_IDLE, ST_IDLE, ST_INTER};
  assign transmitting     = transmitter;
  assign receiving        = in_frame && !transmitter;

  // Bit to drive at the next tx_point.
  always_comb begin
    tx_next = 1'b1;
    unique case (state)
      ST_IDLE:
        tx_next = !(tx_pending && !node_bus_off && !wseq_busy && suspend == '0);
      ST_ID_A, ST_RTR1, ST_IDE, ST_ID_B, ST_RTR2, ST_R1, ST_R0, ST_DLC, ST_DATA:
        if (transmitter) tx_next = stuff_now ? stuff_val : tx_shift[TXW-1];
      ST_CRC:
        if (transmitter) tx_next = stuff_now ? stuff_val : crc_val[4'd14 - bitcnt[3:0]];
      ST_CRC_DELIM:
        if (transmitter && stuff_now) tx_next = stuff_val;
      ST_ACK_SLOT:
        tx_next = transmitter || !crc_ok;
      ST_ERR_FLAG:
        tx_next = node_error_passive;
      ST_OVL_FLAG:
        tx_next = 1'b0;
      default: tx_next = 1'b1;
    endcase
  end

  // Error detected at this sample point (selects the next state and the counters).
  always_comb begin
    bit_error  = 1'b0;
    form_error = 1'b0;
    ack_error  = 1'b0;
    crc_error  = 1'b0;
    arb_lost   = 1'b0;
    stuff_bit  = 1'b0;
    if (sp) begin
      if (in_stuff_region && stuff_now) begin
        stuff_bit = 1'b1;
        if (transmitter && b != tx) bit_error = 1'b1;
      end else if (in_stuff_region && state != ST_CRC_DELIM) begin
        if (transmitter && b != tx) begin
          if (is_arb_field && tx && !b) arb_lost  = 1'b1;
          else                          bit_error = 1'b1;
        end
      end else begin
        unique case (state)
          ST_CRC_DELIM: form_error = !b;
          ST_ACK_SLOT:  ack_error  = transmitter && b && !self_test;
          ST_ACK_DELIM: begin
            form_error = !b;
            crc_error  = b && !transmitter && !crc_ok;
          end
          ST_EOF:       form_error = !b && !(bitcnt == 6'd6 && !transmitter);
          default: ;
        endcase
      end
    end
  end

  assign stuff_error = stuff_err;
  assign err_now     = bit_error || form_error || ack_error || crc_error || stuff_err;

  // Acceptance filter view of the message being received.
  assign rx_ide      = rx_ide_q;
  assign rx_rtr      = rx_ide_q ? rx_rtr2 : rx_rtr1;
  assign rx_id       = rx_ide_q ? {id_a, id_b} : {18'd0, id_a};
  assign rx_data0    = rx_data[0];
  assign rx_data1    = rx_data[1];
  assign rx_no_byte0 = (nbytes == 4'd0);
  assign rx_no_byte1 = (nbytes < 4'd2);

  // Bytes of the received message in buffer layout.
  always_comb begin
    logic [3:0]  hdr;
    logic [31:0] idb;
    hdr = rx_ide_q ? 4'd5 : 4'd3;
    idb = rx_ide_q ? {id_a, id_b, 3'b000} : {id_a, 21'd0};
    if (wseq_idx == 4'd0)
      wseq_byte = {rx_ide_q, rx_rtr, 2'b00, dlc};
    else if (wseq_idx < hdr)
      wseq_byte = idb[5'd31 - {wseq_idx[1:0] - 2'd1, 3'b000} -: 8];
    else
      wseq_byte = rx_data[3'(wseq_idx - hdr)];
  end

  always_ff @(posedge clk) begin
    if (rst || reset_mode) begin
      state         <= ST_WAIT_IDLE;
      bitcnt        <= '0;
      bytecnt       <= '0;
      nbytes        <= '0;
      transmitter   <= 1'b0;
      tx            <= 1'b1;
      tx_shift      <= '0;
      rx_shift      <= '0;
      id_a          <= '0;
      id_b          <= '0;
      dlc           <= '0;
      rx_ide_q      <= 1'b0;
      rx_rtr1       <= 1'b0;
      rx_rtr2       <= 1'b0;
      rx_crc        <= '0;
      crc_ok        <= 1'b0;
      accept        <= 1'b0;
      tx_pending    <= 1'b0;
      tx_done       <= 1'b0;
      go_rx_crc_lim <= 1'b0;
      go_rx_inter   <= 1'b0;
      go_error_frame<= 1'b0;
      go_overload_frame <= 1'b0;
      last_tx       <= 1'b0;
      suspend       <= '0;
      tx_error      <= 1'b0;
      rx_error      <= 1'b0;
      tx_success    <= 1'b0;
      rx_success    <= 1'b0;
      recessive_11  <= 1'b0;
      wseq_busy     <= 1'b0;
      wseq_idx      <= '0;
      wseq_len      <= '0;
      fifo_wr       <= 1'b0;
      fifo_data     <= '0;
      fifo_commit   <= 1'b0;
      for (int i = 0; i < 8; i++) rx_data[i] <= '0;
    end else begin
      tx_done        <= 1'b0;
      go_rx_crc_lim  <= 1'b0;
      go_rx_inter    <= 1'b0;
      go_error_frame <= 1'b0;
      go_overload_frame <= 1'b0;
      tx_error       <= 1'b0;
      rx_error       <= 1'b0;
      tx_success     <= 1'b0;
      rx_success     <= 1'b0;
      recessive_11   <= 1'b0;
      fifo_wr        <= 1'b0;
      fifo_commit    <= 1'b0;

      if (tx_request) tx_pending <= 1'b1;

      // Transmit side: change tx at the start of each bit.
      if (tx_point) begin
        tx <= tx_next;
        if (state == ST_IDLE && !tx_next) begin
          // Starting a frame: load the transmit register.
          transmitter <= 1'b1;
          if (tx_frame.ide)
            tx_shift <= {tx_frame.id[28:18], 1'b1, 1'b1, tx_frame.id[17:0], tx_frame.rtr,
                         2'b00, tx_frame.dlc, tx_frame.data, 2'b00};
          else
            tx_shift <= {tx_frame.id[10:0], tx_frame.rtr, 2'b00, tx_frame.dlc,
                         tx_frame.data, 22'd0};
        end
      end

      // FIFO write sequencer: one byte per clock, then close the message.
      if (wseq_busy) begin
        if (wseq_idx == wseq_len) begin
          fifo_commit <= 1'b1;
          wseq_busy   <= 1'b0;
        end else begin
          fifo_wr   <= 1'b1;
          fifo_data <= wseq_byte;
          wseq_idx  <= wseq_idx + 4'd1;
        end
      end

      if (sp) begin
        if (err_now) begin
          state          <= ST_ERR_FLAG;
          bitcnt         <= '0;
          go_error_frame <= 1'b1;
          last_tx        <= transmitter;
          tx_error       <= transmitter;
          rx_error       <= !transmitter;
          transmitter    <= 1'b0;
        end else if (arb_lost) begin
          transmitter <= 1'b0;
        end

        if (!err_now && !(in_stuff_region && stuff_now)) begin
          if (transmitter && !arb_lost
              && state inside {ST_ID_A, ST_RTR1, ST_IDE, ST_ID_B, ST_RTR2, ST_R1, ST_R0,
                               ST_DLC, ST_DATA})
            tx_shift <= {tx_shift[TXW-2:0], 1'b0};

          unique case (state)
            ST_WAIT_IDLE: begin
              if (!b) bitcnt <= '0;
              else if (bitcnt == 6'd10) begin
                state  <= ST_IDLE;
                bitcnt <= '0;
              end else bitcnt <= bitcnt + 6'd1;
            end
            ST_IDLE, ST_INTER: begin
              if (node_bus_off) begin
                state       <= ST_BUS_OFF;
                bitcnt      <= '0;
                transmitter <= 1'b0;
              end else if (!b && state == ST_INTER && bitcnt != 6'd2) begin
                // Dominant bit in the first two intermission bits: overload condition.
                state             <= ST_OVL_FLAG;
                bitcnt            <= '0;
                go_overload_frame <= 1'b1;
              end else if (!b) begin
                // Start of frame (own or another node's).
                state   <= ST_ID_A;
                suspend <= '0;
                bitcnt  <= '0;
                bytecnt <= '0;
                if (tx) transmitter <= 1'b0;
              end else if (state == ST_INTER) begin
                if (bitcnt == 6'd2) begin
                  state       <= ST_IDLE;
                  go_rx_inter <= 1'b1;
                  // An error-passive node that sent the last frame waits 8 more bits.
                  if (last_tx && node_error_passive) suspend <= 4'd8;
                end else bitcnt <= bitcnt + 6'd1;
              end else if (suspend != '0) begin
                suspend <= suspend - 4'd1;
              end
            end
            ST_ID_A: begin
              id_a <= {id_a[9:0], b};
              if (bitcnt == 6'd10) begin
                state  <= ST_RTR1;
                bitcnt <= '0;
              end else bitcnt <= bitcnt + 6'd1;
            end
            ST_RTR1: begin
              rx_rtr1 <= b;
              state   <= ST_IDE;
            end
            ST_IDE: begin
              rx_ide_q <= b;
              state    <= b ? ST_ID_B : ST_R0;
            end
            ST_ID_B: begin
              id_b <= {id_b[16:0], b};
              if (bitcnt == 6'd17) begin
                state  <= ST_RTR2;
                bitcnt <= '0;
              end else bitcnt <= bitcnt + 6'd1;
            end
            ST_RTR2: begin
              rx_rtr2 <= b;
              state   <= ST_R1;
            end
            ST_R1: state <= ST_R0;
            ST_R0: begin
              state  <= ST_DLC;
              bitcnt <= '0;
            end
            ST_DLC: begin
              dlc <= {dlc[2:0], b};
              if (bitcnt == 6'd3) begin
                nbytes <= frame_bytes(rx_ide_q ? rx_rtr2 : rx_rtr1, {dlc[2:0], b});
                state  <= (frame_bytes(rx_ide_q ? rx_rtr2 : rx_rtr1, {dlc[2:0], b}) == 4'd0)
                          ? ST_CRC : ST_DATA;
                bitcnt <= '0;
                for (int i = 0; i < 8; i++) rx_data[i] <= '0;
              end else bitcnt <= bitcnt + 6'd1;
            end
            ST_DATA: begin
              rx_shift <= {b, rx_shift[6:1]};
              if (bitcnt[2:0] == 3'd7) begin
                rx_data[bytecnt[2:0]] <= rx_byte;
                bytecnt <= bytecnt + 4'd1;
                if (bytecnt + 4'd1 == nbytes) begin
                  state  <= ST_CRC;
                  bitcnt <= '0;
                end else bitcnt <= bitcnt + 6'd1;
              end else bitcnt <= bitcnt + 6'd1;
            end
            ST_CRC: begin
              rx_crc <= {rx_crc[12:0], b};
              if (bitcnt == 6'd14) begin
                state  <= ST_CRC_DELIM;
                bitcnt <= '0;
                crc_ok <= ({rx_crc, b} == crc_val);
              end else bitcnt <= bitcnt + 6'd1;
            end
            ST_CRC_DELIM: begin
              state         <= ST_ACK_SLOT;
              go_rx_crc_lim <= 1'b1;
            end
            ST_ACK_SLOT: state <= ST_ACK_DELIM;
            ST_ACK_DELIM: begin
              state  <= ST_EOF;
              bitcnt <= '0;
              accept <= id_ok;
            end
            ST_EOF: begin
              if (bitcnt == 6'd5 && (!transmitter || self_test)) begin
                // Message valid for receivers after the sixth EOF bit.
                rx_success <= !transmitter;
                if (accept && !wseq_busy) begin
                  wseq_busy <= 1'b1;
                  wseq_idx  <= '0;
                  wseq_len  <= (rx_ide_q ? 4'd5 : 4'd3) + nbytes;
                end
              end
              if (bitcnt == 6'd6) begin
                state   <= b ? ST_INTER : ST_OVL_FLAG;
                bitcnt  <= '0;
                last_tx <= transmitter;
                if (!b) go_overload_frame <= 1'b1;
                if (transmitter) begin
                  tx_success  <= 1'b1;
                  tx_done     <= 1'b1;
                  tx_pending  <= tx_request;
                  transmitter <= 1'b0;
                end
              end else bitcnt <= bitcnt + 6'd1;
            end
            ST_ERR_FLAG, ST_OVL_FLAG: begin
              if (bitcnt == 6'd5) begin
                state  <= ST_ERR_WAIT;
                bitcnt <= '0;
              end else bitcnt <= bitcnt + 6'd1;
            end
            ST_ERR_WAIT: begin
              if (node_bus_off) begin
                state  <= ST_BUS_OFF;
                bitcnt <= '0;
              end else if (b) begin
                state  <= ST_ERR_DELIM;
                bitcnt <= '0;
              end
            end
            ST_ERR_DELIM: begin
              if (!b) state <= ST_ERR_WAIT;
              else if (bitcnt == 6'd6) begin
                state  <= ST_INTER;
                bitcnt <= '0;
              end else bitcnt <= bitcnt + 6'd1;
            end
            ST_BUS_OFF: begin
              if (!node_bus_off) begin
                state  <= ST_WAIT_IDLE;
                bitcnt <= '0;
              end else if (!b) bitcnt <= '0;
              else if (bitcnt == 6'd10) begin
                recessive_11 <= 1'b1;
                bitcnt       <= '0;
              end else bitcnt <= bitcnt + 6'd1;
            end
            default: state <= ST_WAIT_IDLE;
          endcase
        end
      end
    end
  end

endmodule
