// jtag_tap: IEEE 1149.1 test access port for programming and status.
//
// The standard 16 state TAP controller (TMS sampled on rising TCK) with a 4 bit
// instruction register. Instructions:
//   IDCODE (4'h1, selected after reset)  32 bit identification code
//   SETUP  (4'h8)  the programming data: cfg_t followed by one parity bit
//   STATUS (4'hA)  read only status word captured from the status input
//   READOUT (4'hC) 33 bits {valid, word}: the word the readout interface offers
//                  in its JTAG mode. A word is offered while ro_offer (a toggle
//                  from the system clock domain, synchronised here by two
//                  flip-flops) differs from ro_ack; Update-DR after a capture
//                  with valid set flips ro_ack, which releases the word.
//   BYPASS (4'hF and any other code)  one bit bypass register
// Data registers shift towards TDO (bit 0 leaves first, TDI enters at the top),
// TDO changes on the falling edge of TCK. The setup register is copied to the
// cfg output at Update-DR. All programming data share one parity bit, chosen by
// whoever loads it so that the XOR of all bits is zero; setup_parity_err is high
// while the held setup breaks that rule. A TAP reset (TRST or five TMS ones)
// restores CFG_DEFAULT with a matching parity bit.
// cfg and status cross between TCK and the system clock without synchronisers:
// the setup is meant to be loaded while the TDC is idle, and status is a slowly
// changing snapshot. Loading the setup and reading status through JTAG follow
// the document, as does readout through JTAG; the instruction codes, register
// layout and handshake are this design's.
module jtag_tap
  import hptdc_pkg::*;
#(
  parameter int unsigned STATUS_W = 32,
  parameter logic [31:0] IDCODE   = 32'h8470_DACE
) (
  input  logic                tck,
  input  logic                trst_n,
  input  logic                tms,
  input  logic                tdi,
  output logic                tdo,
  input  logic [STATUS_W-1:0] status,
  input  logic [31:0]         ro_word,
  input  logic                ro_offer,
  output logic                ro_ack,
  output cfg_t                cfg,
  output logic                setup_parity_err
);
  typedef enum logic [3:0] {
    TEST_LOGIC_RESET, RUN_TEST_IDLE,
    SELECT_DR, CAPTURE_DR, SHIFT_DR, EXIT1_DR, PAUSE_DR, EXIT2_DR, UPDATE_DR,
    SELECT_IR, CAPTURE_IR, SHIFT_IR, EXIT1_IR, PAUSE_IR, EXIT2_IR, UPDATE_IR
  } tap_e;

  localparam logic [3:0] I_IDCODE = 4'h1;
  localparam logic [3:0] I_SETUP  = 4'h8;
  localparam logic [3:0] I_STATUS = 4'hA;
  localparam logic [3:0] I_READOUT = 4'hC;
  localparam logic [CFG_W:0] SETUP_RESET = {^CFG_DEFAULT, CFG_DEFAULT};

  tap_e                state, next;
  logic [3:0]          ir, ir_sr;
  logic [31:0]         id_sr;
  logic [CFG_W:0]      setup_sr, setup_q;
  logic [STATUS_W-1:0] status_sr;
  logic                bypass_sr;
  logic [32:0]         ro_sr;
  logic                offer_s1, offer_s2, ro_captured;
  logic                tdo_next;

  always_comb begin
    unique case (state)
      TEST_LOGIC_RESET: next = tms ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    next = tms ? SELECT_DR : RUN_TEST_IDLE;
      SELECT_DR:        next = tms ? SELECT_IR : CAPTURE_DR;
      CAPTURE_DR:       next = tms ? EXIT1_DR : SHIFT_DR;
      SHIFT_DR:         next = tms ? EXIT1_DR : SHIFT_DR;
      EXIT1_DR:         next = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:         next = tms ? EXIT2_DR : PAUSE_DR;
      EXIT2_DR:         next = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:        next = tms ? SELECT_DR : RUN_TEST_IDLE;
      SELECT_IR:        next = tms ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       next = tms ? EXIT1_IR : SHIFT_IR;
      SHIFT_IR:         next = tms ? EXIT1_IR : SHIFT_IR;
      EXIT1_IR:         next = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:         next = tms ? EXIT2_IR : PAUSE_IR;
      EXIT2_IR:         next = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:        next = tms ? SELECT_DR : RUN_TEST_IDLE;
      default:          next = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      state       <= TEST_LOGIC_RESET;
      ir          <= I_IDCODE;
      setup_q     <= SETUP_RESET;
      offer_s1    <= 1'b0;
      offer_s2    <= 1'b0;
      ro_ack      <= 1'b0;
      ro_captured <= 1'b0;
    end else begin
      state    <= next;
      offer_s1 <= ro_offer;
      offer_s2 <= offer_s1;
      if (state == CAPTURE_DR && ir == I_READOUT) ro_captured <= (offer_s2 != ro_ack);
      if (state == UPDATE_DR && ir == I_READOUT && ro_captured) begin
        ro_ack      <= !ro_ack;
        ro_captured <= 1'b0;
      end
      if (state == TEST_LOGIC_RESET) begin
        ir      <= I_IDCODE;
        setup_q <= SETUP_RESET;
      end
      if (state == UPDATE_IR) ir <= ir_sr;
      if (state == UPDATE_DR && ir == I_SETUP) setup_q <= setup_sr;
    end
  end

  // shift registers
  always_ff @(posedge tck) begin
    unique case (state)
      CAPTURE_IR: ir_sr <= 4'b0001;
      SHIFT_IR:   ir_sr <= {tdi, ir_sr[3:1]};
      default: ;
    endcase
    if (state == CAPTURE_DR) begin
      id_sr     <= IDCODE;
      setup_sr  <= setup_q;
      status_sr <= status;
      ro_sr     <= {offer_s2 != ro_ack, ro_word};
      bypass_sr <= 1'b0;
    end else if (state == SHIFT_DR) begin
      unique case (ir)
        I_IDCODE: id_sr     <= {tdi, id_sr[31:1]};
        I_SETUP:  setup_sr  <= {tdi, setup_sr[CFG_W:1]};
        I_STATUS: status_sr <= {tdi, status_sr[STATUS_W-1:1]};
        I_READOUT: ro_sr    <= {tdi, ro_sr[32:1]};
        default:  bypass_sr <= tdi;
      endcase
    end
  end

  always_comb begin
    if (state == SHIFT_IR) tdo_next = ir_sr[0];
    else begin
      unique case (ir)
        I_IDCODE: tdo_next = id_sr[0];
        I_SETUP:  tdo_next = setup_sr[0];
        I_STATUS: tdo_next = status_sr[0];
        I_READOUT: tdo_next = ro_sr[0];
        default:  tdo_next = bypass_sr;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= tdo_next;
  end

  assign cfg              = cfg_t'(setup_q[CFG_W-1:0]);
  assign setup_parity_err = ^setup_q;
endmodule
