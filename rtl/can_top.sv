// can_top: CAN protocol controller.
// A complete CAN node minus the line transceiver: a host microcontroller writes a message into
// the transmit buffer and issues a transmit command; the controller arbitrates for the bus,
// frames, stuffs and CRC-protects the message, checks the acknowledgement and retries after
// errors or lost arbitration. Frames from other nodes are destuffed, checked, filtered by the
// acceptance filter and queued in the receive FIFO, from which the host reads them.
//
// Blocks: baud rate prescaler (can_brp) -> bit timing logic (can_btl) -> bit stream processor
// (can_bsp, with CRC, stuffing, frame generator and the Tx/Rx shift registers) <-> acceptance
// filter (can_acf), receive FIFO on the custom 64x8 RAM (can_fifo / can_ram), error management
// logic (can_eml). Host-visible registers are can_register instances.
//
// Host bus (synchronous to clk): with cs and wr high, data_in is written to addr; with cs and rd
// high, the byte at addr appears on data_out on the next clock. Address map:
//   0       mode      bit0 reset_mode (1 after reset), bit1 extended filter mode,
//                     bit2 self test (no ACK needed, own frames received), bit3 single filter
//   1       command   write: bit0 transmit request, bit2 release receive buffer,
//                     bit3 clear data overrun
//   2       status    read: bit0 receive buffer holds a message, bit1 data overrun,
//                     bit2 transmit buffer free, bit3 transmission complete, bit4 receiving,
//                     bit5 transmitting, bit6 error passive, bit7 bus off
//   3       number of messages in the receive FIFO (read)
//   4, 5    receive error counter, transmit error counter bits 7:0 (read)
//   6       bus timing 0  {sync_jump_width[1:0], baud_r_presc[5:0]}
//   7       bus timing 1  {triple_sampling, time_segment2[2:0], time_segment1[3:0]}
//   8..11   acceptance code 0..3,  12..15 acceptance mask 0..3
//   16..28  transmit buffer: frame info {IDE, RTR, 0, 0, DLC[3:0]}, then 2 identifier bytes
//           (standard: ID[10:3], {ID[2:0], 00000}) or 4 (extended: ID[28:21], ID[20:13],
//           ID[12:5], {ID[4:0], 000}), then up to 8 data bytes
//   32..44  receive window: the oldest received message, same layout as the transmit buffer
// Mode, bus timing and acceptance registers can only be written in reset mode; the transmit
// buffer only while no transmission is pending. Bit time = (1 + TSEG1+1 + TSEG2+1) quanta,
// one quantum = (baud_r_presc + 1) clocks.
// The block structure, the two bus timing registers, the acceptance code/mask bytes and the
// 64-byte receive buffer follow the controller's description; the address map and the command
// and status bits are this design's own, laid out after the SJA1000-style register set that the
// bit timing and filter fields come from.
module can_top
  import can_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // host microcontroller bus
  input  logic       cs,
  input  logic       rd,
  input  logic       wr,
  input  logic [5:0] addr,
  input  logic [7:0] data_in,
  output logic [7:0] data_out,
  // transceiver
  input  logic       rx,
  output logic       tx
);

  localparam int unsigned NCFG = 16;   // registers at addresses 0..15 that are stored
  localparam int unsigned NTXB = 13;   // transmit buffer bytes

  // ---------------------------------------------------------------- host registers
  logic [7:0] cfg [NCFG];
  logic [7:0] txb [NTXB];
  logic       host_wr, reset_mode, tx_pending;

  assign host_wr    = cs && wr;
  assign reset_mode = cfg[0][0];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    // Addresses 1..5 are command/status, not storage.
    if (i == 0 || i >= 6) begin : g_reg
      can_register #(.WIDTH(8), .RESET_VALUE((i == 0) ? 8'h01 : 8'h00)) u_reg (
        .clk     (clk),
        .rst     (rst),
        .we      (host_wr && addr == 6'(i) && (reset_mode || i == 0)),
        .data_in (data_in),
        .data_out(cfg[i])
      );
    end else begin : g_none
      assign cfg[i] = 8'h00;
    end
  end

  for (genvar i = 0; i < NTXB; i++) begin : g_txb
    can_register #(.WIDTH(8)) u_reg (
      .clk     (clk),
      .rst     (rst),
      .we      (host_wr && addr == 6'(16 + i) && !tx_pending),
      .data_in (data_in),
      .data_out(txb[i])
    );
  end

  logic cmd_tx, cmd_release, cmd_clear_overrun;
  assign cmd_tx            = host_wr && addr == 6'd1 && data_in[0] && !reset_mode;
  assign cmd_release       = host_wr && addr == 6'd1 && data_in[2];
  assign cmd_clear_overrun = host_wr && addr == 6'd1 && data_in[3];

  // Transmit buffer bytes -> message record.
  can_frame_t tx_frame;
  always_comb begin
    tx_frame.ide = txb[0][7];
    tx_frame.rtr = txb[0][6];
    tx_frame.dlc = txb[0][3:0];
    if (txb[0][7]) begin
      tx_frame.id   = {txb[1], txb[2], txb[3], txb[4][7:3]};
      tx_frame.data = {txb[5], txb[6], txb[7], txb[8], txb[9], txb[10], txb[11], txb[12]};
    end else begin
      tx_frame.id   = {18'd0, txb[1], txb[2][7:5]};
      tx_frame.data = {txb[3], txb[4], txb[5], txb[6], txb[7], txb[8], txb[9], txb[10]};
    end
  end

  // ---------------------------------------------------------------- bit timing
  logic tq_tick, hard_sync, sample_point, sampled_bit, sampled_bit_q, tx_point;
  logic hard_sync_enable, transmitting, resync;

  can_brp u_brp (
    .clk         (clk),
    .rst         (rst || reset_mode),
    .baud_r_presc(cfg[6][5:0]),
    .restart     (hard_sync),
    .tq_tick     (tq_tick)
  );

  can_btl u_btl (
    .clk             (clk),
    .rst             (rst || reset_mode),
    .tq_tick         (tq_tick),
    .rx              (rx),
    .tx              (tx),
    .sync_jump_width (cfg[6][7:6]),
    .time_segment1   (cfg[7][3:0]),
    .time_segment2   (cfg[7][6:4]),
    .triple_sampling (cfg[7][7]),
    .hard_sync_enable(hard_sync_enable),
    .transmitting    (transmitting),
    .sample_point    (sample_point),
    .sampled_bit     (sampled_bit),
    .sampled_bit_q   (sampled_bit_q),
    .tx_point        (tx_point),
    .hard_sync       (hard_sync),
    .resync          (resync)
  );

  // ---------------------------------------------------------------- bit stream processor
  logic [28:0] rx_id;
  logic        rx_ide, rx_rtr, rx_no_byte0, rx_no_byte1;
  logic [7:0]  rx_data0, rx_data1;
  logic        go_rx_crc_lim, go_rx_inter, go_error_frame, go_overload_frame, id_ok;
  logic        fifo_wr, fifo_commit;
  logic [7:0]  fifo_data;
  logic        node_error_passive, node_bus_off;
  logic        tx_error, rx_error, tx_success, rx_success, recessive_11;
  logic        tx_done, receiving;
  logic        ev_arb_lost, ev_bit_error, ev_stuff_error, ev_crc_error, ev_form_error;
  logic        ev_ack_error, ev_stuff_bit;

  can_bsp u_bsp (
    .clk               (clk),
    .rst               (rst),
    .reset_mode        (reset_mode),
    .self_test         (cfg[0][2]),
    .sample_point      (sample_point),
    .sampled_bit       (sampled_bit),
    .tx_point          (tx_point),
    .tx                (tx),
    .hard_sync_enable  (hard_sync_enable),
    .transmitting      (transmitting),
    .tx_request        (cmd_tx),
    .tx_frame          (tx_frame),
    .tx_pending        (tx_pending),
    .tx_done           (tx_done),
    .rx_id             (rx_id),
    .rx_ide            (rx_ide),
    .rx_rtr            (rx_rtr),
    .rx_data0          (rx_data0),
    .rx_data1          (rx_data1),
    .rx_no_byte0       (rx_no_byte0),
    .rx_no_byte1       (rx_no_byte1),
    .go_rx_crc_lim     (go_rx_crc_lim),
    .go_rx_inter       (go_rx_inter),
    .go_error_frame    (go_error_frame),
    .go_overload_frame (go_overload_frame),
    .id_ok             (id_ok),
    .fifo_wr           (fifo_wr),
    .fifo_data         (fifo_data),
    .fifo_commit       (fifo_commit),
    .node_error_passive(node_error_passive),
    .node_bus_off      (node_bus_off),
    .tx_error          (tx_error),
    .rx_error          (rx_error),
    .tx_success        (tx_success),
    .rx_success        (rx_success),
    .recessive_11      (recessive_11),
    .receiving         (receiving),
    .arb_lost          (ev_arb_lost),
    .bit_error         (ev_bit_error),
    .stuff_error       (ev_stuff_error),
    .crc_error         (ev_crc_error),
    .form_error        (ev_form_error),
    .ack_error         (ev_ack_error),
    .stuff_bit         (ev_stuff_bit)
  );

  // ---------------------------------------------------------------- message filtering
  can_acf u_acf (
    .clk                   (clk),
    .rst                   (rst),
    .id                    (rx_id),
    .ide                   (rx_ide),
    .rtr                   (rx_rtr),
    .data0                 (rx_data0),
    .data1                 (rx_data1),
    .no_byte0              (rx_no_byte0),
    .no_byte1              (rx_no_byte1),
    .reset_mode            (reset_mode),
    .acceptance_filter_mode(cfg[0][3]),
    .extended_mode         (cfg[0][1]),
    .acceptance_code_0     (cfg[8]),
    .acceptance_code_1     (cfg[9]),
    .acceptance_code_2     (cfg[10]),
    .acceptance_code_3     (cfg[11]),
    .acceptance_mask_0     (cfg[12]),
    .acceptance_mask_1     (cfg[13]),
    .acceptance_mask_2     (cfg[14]),
    .acceptance_mask_3     (cfg[15]),
    .go_rx_crc_lim         (go_rx_crc_lim),
    .go_rx_inter           (go_rx_inter),
    .go_error_frame        (go_error_frame),
    .id_ok                 (id_ok)
  );

  // ---------------------------------------------------------------- receive message buffer
  logic       rx_window, fifo_overrun, fifo_empty;
  logic [6:0] fifo_cnt;
  logic [7:0] fifo_rdata;

  assign rx_window = (addr >= 6'd32) && (addr <= 6'd44);

  can_fifo #(.ADDR_W(6)) u_fifo (
    .clk              (clk),
    .rst              (rst),
    .reset_mode       (reset_mode),
    .wr               (fifo_wr),
    .data_in          (fifo_data),
    .write_length_info(fifo_commit),
    .release_buffer   (cmd_release),
    .clear_overrun    (cmd_clear_overrun),
    .fifo_selected    (cs && rd && rx_window),
    .addr             (addr - 6'd32),
    .data_out         (fifo_rdata),
    .overrun          (fifo_overrun),
    .info_empty       (fifo_empty),
    .info_cnt         (fifo_cnt)
  );

  // ---------------------------------------------------------------- error management
  logic [8:0] tec;
  logic [7:0] rec;
  err_state_t err_state;

  can_eml u_eml (
    .clk               (clk),
    .rst               (rst),
    .reset_mode        (reset_mode),
    .tx_error          (tx_error),
    .rx_error          (rx_error),
    .tx_success        (tx_success),
    .rx_success        (rx_success),
    .recessive_11      (recessive_11),
    .tec               (tec),
    .rec               (rec),
    .state             (err_state),
    .node_error_passive(node_error_passive),
    .node_bus_off      (node_bus_off)
  );

  // ---------------------------------------------------------------- status and read-back
  logic       tx_complete, read_window_q;
  logic [7:0] status, reg_rdata, reg_rdata_q;

  always_ff @(posedge clk) begin
    if (rst)              tx_complete <= 1'b0;
    else if (cmd_tx)      tx_complete <= 1'b0;
    else if (tx_done)     tx_complete <= 1'b1;
  end

  assign status = {node_bus_off, node_error_passive, transmitting, receiving, tx_complete,
                   !tx_pending, fifo_overrun, !fifo_empty};

  always_comb begin
    if (addr < 6'(NCFG)) begin
      unique case (addr)
        6'd1:    reg_rdata = 8'h00;
        6'd2:    reg_rdata = status;
        6'd3:    reg_rdata = {1'b0, fifo_cnt};
        6'd4:    reg_rdata = rec;
        6'd5:    reg_rdata = tec[7:0];
        default: reg_rdata = cfg[addr[3:0]];
      endcase
    end else if (addr >= 6'd16 && addr < 6'(16 + NTXB))
      reg_rdata = txb[4'(addr - 6'd16)];
    else
      reg_rdata = 8'h00;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rdata_q   <= '0;
      read_window_q <= 1'b0;
    end else if (cs && rd) begin
      reg_rdata_q   <= reg_rdata;
      read_window_q <= rx_window;
    end
  end

  assign data_out = read_window_q ? fifo_rdata : reg_rdata_q;

  // Bus events, kept for observation in simulation.
  logic unused_ok;
  assign unused_ok = &{1'b0, tec[8], resync, sampled_bit_q, err_state, ev_arb_lost, ev_bit_error,
                       ev_stuff_error, ev_crc_error, ev_form_error, ev_ack_error, ev_stuff_bit,
                       go_overload_frame};

endmodule
