// can_acf: acceptance check filter (message filtering).
// Decides whether a received message is kept. Four acceptance code bytes give the bit values
// wanted and four acceptance mask bytes mark bits as "don't care" (mask bit 1 = ignore).
//  * extended_mode = 0 (basic mode): only code_0/mask_0 are used, against the eight most
//    significant identifier bits (id[10:3] for a standard frame, id[28:21] for an extended one).
//  * extended_mode = 1, acceptance_filter_mode = 1 (single filter): one 32-bit filter.
//      standard: code_0 = id[10:3], code_1[7:4] = {id[2:0], rtr}, code_2 = data0, code_3 = data1
//      extended: code_0..code_3 = {id[28:0], rtr, 2 unused bits}
//    Data bytes the frame does not carry (no_byte0 / no_byte1) are not compared.
//  * extended_mode = 1, acceptance_filter_mode = 0 (dual filter): the message is accepted if
//    either of two shorter filters matches.
//      standard: filter 1 = code_0, code_1[7:4] = {id[2:0], rtr}, code_1[3:0] = data0[7:4],
//                code_3[3:0] = data0[3:0];  filter 2 = code_2, code_3[7:4] = {id[2:0], rtr}
//      extended: filter 1 = {code_0, code_1} = id[28:13];  filter 2 = {code_2, code_3} = id[28:13]
// id_ok is a register: it is loaded with the filter result when go_rx_crc_lim pulses (the
// identifier, control and first data bytes are complete by then) and cleared by go_rx_inter,
// go_error_frame or reset_mode.
// The port names, the four code and four mask bytes and the mode inputs follow the controller's
// ACF; how the bytes map onto the frame fields is taken from the widely used SJA1000-style
// register layout these ports belong to, as the controller gives no mapping of its own.
module can_acf (
  input  logic        clk,
  input  logic        rst,
  input  logic [28:0] id,
  input  logic        ide,
  input  logic        rtr,
  input  logic [7:0]  data0,
  input  logic [7:0]  data1,
  input  logic        no_byte0,
  input  logic        no_byte1,
  input  logic        reset_mode,
  input  logic        acceptance_filter_mode,
  input  logic        extended_mode,
  input  logic [7:0]  acceptance_code_0,
  input  logic [7:0]  acceptance_code_1,
  input  logic [7:0]  acceptance_code_2,
  input  logic [7:0]  acceptance_code_3,
  input  logic [7:0]  acceptance_mask_0,
  input  logic [7:0]  acceptance_mask_1,
  input  logic [7:0]  acceptance_mask_2,
  input  logic [7:0]  acceptance_mask_3,
  input  logic        go_rx_crc_lim,
  input  logic        go_rx_inter,
  input  logic        go_error_frame,
  output logic        id_ok
);

  // A field matches when every bit not masked out equals the code bit.
  function automatic logic fits(input logic [7:0] value, input logic [7:0] code,
                                input logic [7:0] mask);
    return ((value ^ code) & ~mask) == 8'h00;
  endfunction

  logic match;

  always_comb begin
    logic [7:0] hi;
    logic m1, m2;
    hi = '0;
    m1 = 1'b0;
    m2 = 1'b0;
    if (!extended_mode) begin
      hi    = ide ? id[28:21] : id[10:3];
      match = fits(hi, acceptance_code_0, acceptance_mask_0);
    end else if (acceptance_filter_mode) begin
      if (!ide)
        match = fits(id[10:3], acceptance_code_0, acceptance_mask_0)
              & fits({id[2:0], rtr, 4'h0}, acceptance_code_1, acceptance_mask_1 | 8'h0f)
              & (no_byte0 | fits(data0, acceptance_code_2, acceptance_mask_2))
              & (no_byte1 | fits(data1, acceptance_code_3, acceptance_mask_3));
      else
        match = fits(id[28:21], acceptance_code_0, acceptance_mask_0)
              & fits(id[20:13], acceptance_code_1, acceptance_mask_1)
              & fits(id[12:5],  acceptance_code_2, acceptance_mask_2)
              & fits({id[4:0], rtr, 2'b00}, acceptance_code_3, acceptance_mask_3 | 8'h03);
    end else begin
      if (!ide) begin
        m1 = fits(id[10:3], acceptance_code_0, acceptance_mask_0)
           & fits({id[2:0], rtr, 4'h0}, acceptance_code_1, acceptance_mask_1 | 8'h0f)
           & (no_byte0 | (fits({data0[7:4], 4'h0}, {acceptance_code_1[3:0], 4'h0},
                               {acceptance_mask_1[3:0], 4'hf})
                        & fits({data0[3:0], 4'h0}, {acceptance_code_3[3:0], 4'h0},
                               {acceptance_mask_3[3:0], 4'hf})));
        m2 = fits(id[10:3], acceptance_code_2, acceptance_mask_2)
           & fits({id[2:0], rtr, 4'h0}, acceptance_code_3, acceptance_mask_3 | 8'h0f);
      end else begin
        m1 = fits(id[28:21], acceptance_code_0, acceptance_mask_0)
           & fits(id[20:13], acceptance_code_1, acceptance_mask_1);
        m2 = fits(id[28:21], acceptance_code_2, acceptance_mask_2)
           & fits(id[20:13], acceptance_code_3, acceptance_mask_3);
      end
      match = m1 | m2;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || reset_mode || go_rx_inter || go_error_frame) id_ok <= 1'b0;
    else if (go_rx_crc_lim)                                   id_ok <= match;
  end

endmodule
