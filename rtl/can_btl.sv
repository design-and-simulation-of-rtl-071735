// can_btl: CAN bit timing logic.
// A bit is built from time quanta (tq_tick from the baud rate prescaler): one SYNC quantum,
// TSEG1 = time_segment1+1 quanta and TSEG2 = time_segment2+1 quanta. The bus level rx is looked
// at once per quantum. The bit is sampled at the end of TSEG1 (sample_point pulses for one clock
// and sampled_bit is updated; sampled_bit_q keeps the previous sample). With triple_sampling the
// bit is the majority of the last three quantum samples. tx_point pulses for one clock where a new
// bit begins, which is when the bit stream processor should change tx.
// Synchronisation uses recessive-to-dominant edges only:
//  * hard sync (hard_sync_enable, i.e. the bus is idle or in intermission): the quantum that held
//    the edge becomes the SYNC quantum and the bit restarts; hard_sync pulses.
//  * resynchronisation otherwise, at most once per bit, only if the last sampled bit was
//    recessive and the node is not itself sending a dominant bit: an edge in TSEG1 lengthens
//    TSEG1 by the phase error, an edge in TSEG2 shortens TSEG2, each limited to
//    sync_jump_width+1 quanta. resync pulses for one clock when a resynchronisation is applied.
// The register fields (6-bit prescaler, 2-bit SJW, 4-bit TSEG1, 3-bit TSEG2, triple sampling)
// and the signal names follow the controller's BTL; the quantum-level state machine and the
// one-quantum edge detection are this design's own.
module can_btl (
  input  logic       clk,
  input  logic       rst,
  input  logic       tq_tick,
  input  logic       rx,
  input  logic       tx,
  input  logic [1:0] sync_jump_width,
  input  logic [3:0] time_segment1,
  input  logic [2:0] time_segment2,
  input  logic       triple_sampling,
  input  logic       hard_sync_enable,
  input  logic       transmitting,
  output logic       sample_point,
  output logic       sampled_bit,
  output logic       sampled_bit_q,
  output logic       tx_point,
  output logic       hard_sync,
  output logic       resync
);

  typedef enum logic [1:0] {SEG_SYNC, SEG_TSEG1, SEG_TSEG2} seg_t;

  seg_t       seg;
  logic [4:0] cnt;          // index of the quantum that just ended, within its segment
  logic [4:0] ext;          // TSEG1 lengthening from resynchronisation
  logic [4:0] shrink;       // TSEG2 shortening from resynchronisation
  logic       resync_done;
  logic       rx_q1, rx_q2; // rx at the previous two quantum ticks

  logic [4:0] t1_len, t2_len, sjw_len, phase, cnt_next;
  logic       edge_seen, resync_ok, majority;

  assign t1_len    = {1'b0, time_segment1} + 5'd1;
  assign t2_len    = {2'b00, time_segment2} + 5'd1;
  assign sjw_len   = {3'b000, sync_jump_width} + 5'd1;
  assign cnt_next  = cnt + 5'd1;
  assign edge_seen = rx_q1 && !rx;
  assign resync_ok = edge_seen && !hard_sync_enable && !resync_done && sampled_bit
                     && !(transmitting && !tx);
  assign majority  = (rx & rx_q1) | (rx & rx_q2) | (rx_q1 & rx_q2);
  // Phase error of an edge seen in TSEG1: the quanta since the SYNC quantum.
  assign phase     = (cnt_next < sjw_len) ? cnt_next : sjw_len;

  always_ff @(posedge clk) begin
    if (rst) begin
      seg           <= SEG_SYNC;
      cnt           <= '0;
      ext           <= '0;
      shrink        <= '0;
      resync_done   <= 1'b0;
      rx_q1         <= 1'b1;
      rx_q2         <= 1'b1;
      sampled_bit   <= 1'b1;
      sampled_bit_q <= 1'b1;
      sample_point  <= 1'b0;
      tx_point      <= 1'b0;
      hard_sync     <= 1'b0;
      resync        <= 1'b0;
    end else begin
      sample_point <= 1'b0;
      tx_point     <= 1'b0;
      hard_sync    <= 1'b0;
      resync       <= resync_ok && !hard_sync_enable && seg != SEG_SYNC && tq_tick;
      if (tq_tick) begin
        rx_q1 <= rx;
        rx_q2 <= rx_q1;
        if (edge_seen && hard_sync_enable) begin
          // The quantum holding the edge was SYNC; continue in TSEG1.
          seg         <= SEG_TSEG1;
          cnt         <= '0;
          ext         <= '0;
          shrink      <= '0;
          resync_done <= 1'b1;
          hard_sync   <= 1'b1;
        end else begin
          unique case (seg)
            SEG_SYNC: begin
              seg <= SEG_TSEG1;
              cnt <= '0;
            end
            SEG_TSEG1: begin
              logic [4:0] len;
              len = t1_len + ext;
              if (resync_ok) begin
                len = t1_len + phase;
                ext         <= phase;
                resync_done <= 1'b1;
              end
              if (cnt_next >= len) begin
                seg           <= SEG_TSEG2;
                cnt           <= '0;
                sample_point  <= 1'b1;
                sampled_bit   <= triple_sampling ? majority : rx;
                sampled_bit_q <= sampled_bit;
              end else begin
                cnt <= cnt_next;
              end
            end
            default: begin // SEG_TSEG2
              logic [4:0] remain;
              remain = t2_len - cnt_next; // quanta still to come in TSEG2
              if (resync_ok && remain <= sjw_len) begin
                // Early edge within the jump width: this quantum was the new SYNC.
                seg         <= SEG_TSEG1;
                cnt         <= '0;
                ext         <= '0;
                shrink      <= '0;
                resync_done <= 1'b0;
                tx_point    <= 1'b1;
              end else begin
                logic [4:0] sh;
                sh = shrink;
                if (resync_ok) begin
                  sh = sjw_len;
                  shrink      <= sjw_len;
                  resync_done <= 1'b1;
                end
                if (cnt_next + sh >= t2_len) begin
                  seg         <= SEG_SYNC;
                  cnt         <= '0;
                  ext         <= '0;
                  shrink      <= '0;
                  resync_done <= 1'b0;
                  tx_point    <= 1'b1;
                end else begin
                  cnt <= cnt_next;
                end
              end
            end
          endcase
        end
      end
    end
  end

endmodule
