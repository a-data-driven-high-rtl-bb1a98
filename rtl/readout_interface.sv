// readout_interface: sends readout FIFO words off chip, with token passing.
//
// Three modes, chosen by the setup:
//   RO_PARALLEL  a 32 bit word on data_out with data_ready; the receiver takes
//                it by holding get_data high for a cycle while data_ready is high.
//   RO_BYTE      the same handshake, four times per word, bytes most significant
//                first on data_out[7:0].
//   RO_SERIAL    the word is shifted out on serial_out most significant bit first,
//                one bit every 2**serial_div cycles; serial_strobe marks the last
//                cycle of each bit (sample there) and data_ready frames the word.
//   RO_JTAG      the word is offered to the JTAG port (jtag_word) and held until
//                JTAG has read it: offering flips jtag_offer, reading flips
//                jtag_ack (TCK domain, synchronised here by two flip-flops);
//                the word is done when the two toggles agree again.
// Token passing (token_enable) lets several TDCs share one readout bus: a chip
// sends only while it holds the token. It takes the token on a token_in pulse
// and hands it on with a one cycle token_out pulse after it has sent an event
// trailer, or at once when it has nothing to send outside an event. Without
// token_enable the interface sends whenever the FIFO has data. One-hot state
// machine with illegal state detection (fsm_err). The three readout widths and
// token passing and readout through JTAG follow the document; the handshakes
// and framing are this design's.
module readout_interface
  import hptdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ro_mode_e    mode,
  input  logic [2:0]  serial_div,
  input  logic        token_enable,
  // readout FIFO
  input  logic [31:0] fifo_data,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  // off chip
  output logic [31:0] data_out,
  output logic        data_ready,
  input  logic        get_data,
  output logic        serial_out,
  output logic        serial_strobe,
  input  logic        token_in,
  output logic        token_out,
  // JTAG readout
  output logic [31:0] jtag_word,
  output logic        jtag_offer,
  input  logic        jtag_ack,
  output logic        fsm_err
);
  typedef enum logic [2:0] {
    S_IDLE = 3'b001,
    S_SEND = 3'b010,
    S_PASS = 3'b100
  } state_e;

  state_e      state;
  logic [31:0] word;
  logic [4:0]  bit_idx;
  logic [1:0]  byte_idx;
  logic [7:0]  div_cnt;
  logic        has_token, in_event;
  logic        may_send, last_part, is_trailer, is_header;
  logic        ack_s1, ack_s2;

  // jtag_ack comes from the TCK domain
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= jtag_ack;
      ack_s2 <= ack_s1;
    end
  end
  assign jtag_word = word;

  assign may_send   = !token_enable || has_token;
  assign is_trailer = (word[31:28] == W_TRAILER);
  assign is_header  = (fifo_data[31:28] == W_HEADER);
  assign fsm_err    = (state == state_e'(0)) || ((state & (state - 1'b1)) != 0);

  always_comb begin
    data_out      = '0;
    data_ready    = 1'b0;
    serial_out    = 1'b0;
    serial_strobe = 1'b0;
    last_part     = 1'b0;
    fifo_rd       = 1'b0;
    token_out     = 1'b0;
    unique case (state)
      S_IDLE: fifo_rd = may_send && !fifo_empty;
      S_SEND: begin
        data_ready = 1'b1;
        unique case (mode)
          RO_BYTE: begin
            data_out  = {24'd0, word[8*(2'd3 - byte_idx) +: 8]};
            last_part = get_data && byte_idx == 2'd3;
          end
          RO_SERIAL: begin
            serial_out    = word[5'd31 - bit_idx];
            serial_strobe = (div_cnt == ((8'd1 << serial_div) - 8'd1));
            last_part     = serial_strobe && bit_idx == 5'd31;
          end
          RO_JTAG: begin
            data_ready = 1'b0;
            last_part  = (ack_s2 == jtag_offer);
          end
          default: begin
            data_out  = word;
            last_part = get_data;
          end
        endcase
      end
      S_PASS: token_out = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      word      <= '0;
      bit_idx   <= '0;
      byte_idx  <= '0;
      div_cnt   <= '0;
      has_token <= 1'b0;
      in_event   <= 1'b0;
      jtag_offer <= 1'b0;
    end else begin
      if (token_in) has_token <= 1'b1;
      unique case (state)
        S_IDLE: begin
          bit_idx  <= '0;
          byte_idx <= '0;
          div_cnt  <= '0;
          if (fifo_rd) begin
            word  <= fifo_data;
            state <= S_SEND;
            if (mode == RO_JTAG) jtag_offer <= !jtag_offer;
            if (is_header) in_event <= 1'b1;
          end else if (token_enable && has_token && fifo_empty && !in_event) begin
            state <= S_PASS;
          end
        end
        S_SEND: begin
          if (mode == RO_BYTE && get_data) byte_idx <= byte_idx + 1'b1;
          if (mode == RO_SERIAL) begin
            if (serial_strobe) begin
              div_cnt <= '0;
              bit_idx <= bit_idx + 1'b1;
            end else begin
              div_cnt <= div_cnt + 1'b1;
            end
          end
          if (last_part) begin
            if (is_trailer) in_event <= 1'b0;
            state <= (token_enable && is_trailer) ? S_PASS : S_IDLE;
          end
        end
        S_PASS: begin
          has_token <= 1'b0;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
