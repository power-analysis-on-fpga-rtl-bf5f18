// decryption_register: register map and clock-domain crossing between the
// USB interface (usb_clk) and the decryption module (crypt_clk).
//
// USB side. Writes to REG_P_MATRIX_IN, REG_POLY_G_IN and REG_CIPHER_IN become
// byte writes into the corresponding input memory (we_support, we_poly,
// we_cipher with mem_addr = offset). A write to REG_CRYPT_GO with bit 0 set
// starts a decryption; its bit 1 selects the trigger mode (0: trigger for the
// whole decryption, 1: trigger only during the last step, plaintext recovery).
// Reads: REG_REC_ERR_OUT returns the plaintext byte from the output
// multiplexer (rd_addr = offset), REG_CRYPT_GO returns {trigger mode, busy},
// REG_CLKSETTINGS and REG_USER_LED return what was written, REG_CRYPT_TYPE,
// REG_CRYPT_REV, REG_IDENTIFY and REG_BUILDTIME (4 bytes) return constants.
// The register numbers follow the design; the meaning of the bits and the
// constants are this implementation's choices.
//
// Clock crossing: the start request is a toggle in the USB domain, passed
// through two flip-flops into the decryption domain, where a change makes a
// one-cycle start pulse. busy and the trigger mode cross the other way and
// into the decryption domain through two flip-flops each. The host must not
// write inputs while busy reads 1.
//
// trigger (decryption domain) is high from start while the decryption module
// is busy (mode 0, the default, as in the design), or, in mode 1, only while
// it runs the plaintext-recovery step. Mode 1 is this implementation's own: it
// places a capture of the last step without an offset computed from the cycle
// counts of the earlier steps.
module decryption_register
  import mce_pkg::*;
#(
  parameter logic [7:0]  CRYPT_TYPE = 8'h0C,          // Classic McEliece
  parameter logic [7:0]  CRYPT_REV  = 8'h01,
  parameter logic [7:0]  IDENTIFY   = 8'h2E,
  parameter logic [31:0] BUILDTIME  = 32'h0000_0000
) (
  // USB domain
  input  logic        usb_clk,
  input  logic        rst,
  input  logic [7:0]  reg_addr,
  input  logic [12:0] reg_offset,
  input  logic [7:0]  reg_wdata,
  input  logic        reg_write,
  output logic [7:0]  reg_rdata,
  output logic        we_support,
  output logic        we_poly,
  output logic        we_cipher,
  output logic [12:0] mem_addr,
  output logic [7:0]  mem_wdata,
  output logic [12:0] rd_addr,
  input  logic [7:0]  rd_data,
  output logic [7:0]  clk_settings,
  output logic [7:0]  user_led,
  // decryption domain
  input  logic        crypt_clk,
  output logic        start,
  input  logic        busy,
  input  step_t       step,
  output logic        trigger
);

  // ---------------- USB domain ----------------
  logic       go_tgl;
  logic       trig_mode;
  logic [1:0] busy_sync;

  assign we_support = reg_write && reg_addr == REG_P_MATRIX_IN;
  assign we_poly    = reg_write && reg_addr == REG_POLY_G_IN;
  assign we_cipher  = reg_write && reg_addr == REG_CIPHER_IN;
  assign mem_addr   = reg_offset;
  assign mem_wdata  = reg_wdata;
  assign rd_addr    = reg_offset;

  always_ff @(posedge usb_clk) begin
    if (rst) begin
      go_tgl       <= 1'b0;
      trig_mode    <= 1'b0;
      clk_settings <= '0;
      user_led     <= '0;
      busy_sync    <= '0;
    end else begin
      busy_sync <= {busy_sync[0], busy};
      if (reg_write) begin
        case (reg_addr)
          REG_CLKSETTINGS: clk_settings <= reg_wdata;
          REG_USER_LED:    user_led     <= reg_wdata;
          REG_CRYPT_GO: begin
            trig_mode <= reg_wdata[1];
            if (reg_wdata[0]) go_tgl <= ~go_tgl;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      REG_CLKSETTINGS: reg_rdata = clk_settings;
      REG_USER_LED:    reg_rdata = user_led;
      REG_CRYPT_TYPE:  reg_rdata = CRYPT_TYPE;
      REG_CRYPT_REV:   reg_rdata = CRYPT_REV;
      REG_IDENTIFY:    reg_rdata = IDENTIFY;
      REG_CRYPT_GO:    reg_rdata = {6'b0, trig_mode, busy_sync[1]};
      REG_BUILDTIME:   reg_rdata = BUILDTIME[8*reg_offset[1:0] +: 8];
      REG_REC_ERR_OUT: reg_rdata = rd_data;
      default:         reg_rdata = 8'h00;
    endcase
  end

  // ---------------- decryption domain ----------------
  logic [2:0] go_sync;       // two synchronising stages and the previous value
  logic [1:0] mode_sync;

  always_ff @(posedge crypt_clk) begin
    if (rst) begin
      go_sync   <= '0;
      mode_sync <= '0;
      start     <= 1'b0;
      trigger   <= 1'b0;
    end else begin
      go_sync   <= {go_sync[1:0], go_tgl};
      mode_sync <= {mode_sync[0], trig_mode};
      start     <= go_sync[2] ^ go_sync[1];
      trigger   <= mode_sync[1] ? (step == STEP_LOCATE) : (busy || start);
    end
  end

endmodule
