// bspt_fpga: board support logic of the CMX, seen from VME.
//
// A VME A24/D16 slave answering in the first 256 bytes of the module's 512 KB
// window: 0x700000 for the CMX in slot 3, 0x780000 for the CMX in slot 20
// (geographic address ga). VME strobes are synchronized to clk with two flip-
// flops; after a matching data strobe the access is done and DTACK* is pulled
// low until the data strobe is released. The module also drives the VME data
// bus transceivers (enable and direction). Register map (byte offsets, D16):
//   00 RO module ID / serial    02 RO HW/FW revision
//   04 RW module control         06 RW module resets (levels)
//   08 RO module status 1        0A RO module status 2
//   0C RO LVDS status 1 {tp_req, bf_req}
//   0E RO LVDS status 2 {conflict, lvds_dir}
//   10+4k RW I2C control/status, 12+4k RW I2C data, k = 0..5 (SFP1..4, MP12, MP345)
//   30 RW TTCrx control          32 RO TTCrx status
//   34 RO TTCDec broadcast (latched on its strobe)   36 RO TTCDec DQ (latched)
//   80..DE  System ACE MPU registers, offset - 0x80 on the ACE address lines
// Other offsets are reserved: reads return 0, writes are ignored, DTACK* is given.
// I2C: writing the control register starts a transaction with
// {read[15], device[14:8], register[7:0]}; a write sends bits 15..8 of the data
// register, a read returns its byte in bits 7..0. Control/status reads as
// {busy, nack, 000000, register}. Writing control while busy is ignored.
// System ACE: an access holds chip enable plus write or output enable for
// ACE_CYCLES clocks; read data is taken at the end of the strobe, write or
// output enable is released one clock before chip enable, then DTACK* follows.
// LVDS links: each link is turned to output when the BF or the TP FPGA asks for
// it; if both ask, it stays an input and the conflict bit is set.
// From the description: the address map, the I2C register pair and its data
// byte positions, DTACK generation, transceiver control, TTCDec and ACE access,
// LVDS control from the BF/TP requests, LEDs. Own choices: the control/status
// bit layout, the ACE strobe timing, the LVDS rule, reserved-address behaviour
// and the LED assignment. The TTCDec dump RAM (0x40-0x5E) is not implemented.
module bspt_fpga #(
  parameter logic [15:0] MODULE_ID   = 16'hC301,
  parameter logic [15:0] REVISION    = 16'h0200,
  parameter int unsigned N_I2C       = 6,
  parameter int unsigned N_LVDS      = 8,
  parameter int unsigned I2C_DIV     = 100,
  parameter int unsigned ACE_CYCLES  = 4,
  parameter int unsigned LED_STRETCH = 22   // log2 of the LED pulse stretch
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        ga,
  // VME
  input  logic [23:1]       vme_addr,
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [15:0]       vme_d_in,
  output logic [15:0]       vme_d_out,
  output logic              vme_buf_oe_n,
  output logic              vme_buf_dir,    // 1: board drives the VME data bus
  output logic              vme_dtack_n,
  // module control and status
  input  logic [15:0]       status1_in,     // bit 0 BF done, bit 1 TP done
  input  logic [15:0]       status2_in,
  output logic [15:0]       module_ctrl,
  output logic [15:0]       module_resets,
  // LVDS transceivers
  input  logic [N_LVDS-1:0] bf_lvds_req,
  input  logic [N_LVDS-1:0] tp_lvds_req,
  output logic [N_LVDS-1:0] lvds_dir,
  // I2C to optical modules
  output logic [N_I2C-1:0]  scl_oe,
  output logic [N_I2C-1:0]  sda_oe,
  input  logic [N_I2C-1:0]  scl_i,
  input  logic [N_I2C-1:0]  sda_i,
  // TTCrx on the TTCDec
  output logic [15:0]       ttc_ctrl,
  input  logic [15:0]       ttc_status,
  input  logic [7:0]        ttc_brcst,
  input  logic              ttc_brcst_str,
  input  logic [3:0]        ttc_dq,
  input  logic              ttc_dout_str,
  // System ACE MPU port
  output logic [6:0]        ace_mpa,
  output logic [15:0]       ace_mpd_o,
  input  logic [15:0]       ace_mpd_i,
  output logic              ace_mpd_oe,
  output logic              ace_mpce_n,
  output logic              ace_mpwe_n,
  output logic              ace_mpoe_n,
  // front panel
  output logic [3:0]        leds
);

  // ---------------- VME strobe synchronization ----------------
  logic [1:0] as_s, ds_s, wr_s;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin as_s <= 2'b00; ds_s <= 2'b00; wr_s <= 2'b00; end
    else begin
      as_s <= {as_s[0], ~vme_as_n};
      ds_s <= {ds_s[0], ~vme_ds_n};
      wr_s <= {wr_s[0], ~vme_write_n};
    end

  logic       match;
  logic [7:0] off;
  assign off   = {vme_addr[7:1], 1'b0};
  assign match = as_s[1] && ds_s[1] &&
                 vme_addr[23:19] == {4'b0111, ga == 5'd20} && vme_addr[18:8] == '0;

  // ---------------- LVDS management ----------------
  logic [N_LVDS-1:0] lvds_conflict;
  assign lvds_conflict = bf_lvds_req & tp_lvds_req;
  assign lvds_dir      = (bf_lvds_req | tp_lvds_req) & ~lvds_conflict;

  // ---------------- I2C channels ----------------
  logic [N_I2C-1:0]       i2c_start, i2c_busy, i2c_done, i2c_nack;
  logic [N_I2C-1:0][7:0]  i2c_rdata, i2c_reg, i2c_wdata;
  logic [N_I2C-1:0][6:0]  i2c_dev;
  logic [N_I2C-1:0]       i2c_rw;

  for (genvar k = 0; k < N_I2C; k++) begin : g_i2c
    i2c_master #(.DIV(I2C_DIV)) u_i2c (
      .clk(clk), .rst_n(rst_n), .start(i2c_start[k]), .rw(i2c_rw[k]),
      .dev_addr(i2c_dev[k]), .reg_addr(i2c_reg[k]), .wdata(i2c_wdata[k]),
      .busy(i2c_busy[k]), .done(i2c_done[k]), .nack(i2c_nack[k]), .rdata(i2c_rdata[k]),
      .scl_oe(scl_oe[k]), .sda_oe(sda_oe[k]), .scl_i(scl_i[k]), .sda_i(sda_i[k])
    );
  end

  // ---------------- TTCDec capture ----------------
  logic [7:0] brcst_l;
  logic [3:0] dq_l;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin brcst_l <= '0; dq_l <= '0; end
    else begin
      if (ttc_brcst_str) brcst_l <= ttc_brcst;
      if (ttc_dout_str)  dq_l    <= ttc_dq;
    end

  // ---------------- register read mux ----------------
  logic [15:0] rd_val;
  always_comb begin
    rd_val = 16'h0000;
    case (off)
      8'h00: rd_val = MODULE_ID;
      8'h02: rd_val = REVISION;
      8'h04: rd_val = module_ctrl;
      8'h06: rd_val = module_resets;
      8'h08: rd_val = status1_in;
      8'h0A: rd_val = status2_in;
      8'h0C: rd_val = 16'({tp_lvds_req, bf_lvds_req});
      8'h0E: rd_val = 16'({lvds_conflict, lvds_dir});
      8'h30: rd_val = ttc_ctrl;
      8'h32: rd_val = ttc_status;
      8'h34: rd_val = {8'h00, brcst_l};
      8'h36: rd_val = {12'h000, dq_l};
      default: begin
        for (int k = 0; k < int'(N_I2C); k++) begin
          if (off == 8'(8'h10 + 4*k))
            rd_val = {i2c_busy[k], i2c_nack[k], 6'b0, i2c_reg[k]};
          if (off == 8'(8'h12 + 4*k))
            rd_val = {i2c_wdata[k], i2c_rdata[k]};
        end
      end
    endcase
  end

  // ---------------- VME cycle control ----------------
  typedef enum logic [1:0] {V_IDLE, V_ACE, V_ACK} vstate_t;
  vstate_t vstate;
  logic [$clog2(ACE_CYCLES+1)-1:0] ace_cnt;
  logic                            is_read;
  logic                            access_pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vstate <= V_IDLE; vme_dtack_n <= 1'b1; vme_d_out <= '0; vme_buf_oe_n <= 1'b1;
      vme_buf_dir <= 1'b0; is_read <= 1'b0; module_ctrl <= '0; module_resets <= '0;
      ttc_ctrl <= '0; i2c_start <= '0; i2c_rw <= '0; i2c_dev <= '0; i2c_reg <= '0;
      i2c_wdata <= '0; ace_cnt <= '0; ace_mpa <= '0; ace_mpd_o <= '0; ace_mpd_oe <= 1'b0;
      ace_mpce_n <= 1'b1; ace_mpwe_n <= 1'b1; ace_mpoe_n <= 1'b1; access_pulse <= 1'b0;
    end else begin
      i2c_start    <= '0;
      access_pulse <= 1'b0;
      case (vstate)
        V_IDLE: begin
          vme_dtack_n  <= 1'b1;
          vme_buf_oe_n <= 1'b1;
          vme_buf_dir  <= 1'b0;
          if (match) begin
            is_read      <= !wr_s[1];
            access_pulse <= 1'b1;
            vme_buf_oe_n <= 1'b0;          // transceivers on, direction by cycle type
            vme_buf_dir  <= !wr_s[1];
            if (off >= 8'h80 && off <= 8'hDE) begin
              ace_mpa    <= off[6:0];
              ace_mpd_o  <= vme_d_in;
              ace_mpd_oe <= wr_s[1];
              ace_mpce_n <= 1'b0;
              ace_mpwe_n <= !wr_s[1];
              ace_mpoe_n <= wr_s[1];
              ace_cnt    <= '0;
              vstate     <= V_ACE;
            end else begin
              if (!wr_s[1]) vme_d_out <= rd_val;
              else begin
                case (off)
                  8'h04: module_ctrl   <= vme_d_in;
                  8'h06: module_resets <= vme_d_in;
                  8'h30: ttc_ctrl      <= vme_d_in;
                  default: ;
                endcase
                for (int k = 0; k < int'(N_I2C); k++) begin
                  if (off == 8'(8'h12 + 4*k)) i2c_wdata[k] <= vme_d_in[15:8];
                  if (off == 8'(8'h10 + 4*k) && !i2c_busy[k]) begin
                    i2c_rw[k]    <= vme_d_in[15];
                    i2c_dev[k]   <= vme_d_in[14:8];
                    i2c_reg[k]   <= vme_d_in[7:0];
                    i2c_start[k] <= 1'b1;
                  end
                end
              end
              vme_dtack_n <= 1'b0;
              vstate      <= V_ACK;
            end
          end
        end
        V_ACE: begin
          ace_cnt <= ace_cnt + 1'b1;
          if (ace_cnt == ($clog2(ACE_CYCLES+1))'(ACE_CYCLES - 1)) begin
            // end of the strobe: take read data, release WE*/OE* first
            if (is_read) vme_d_out <= ace_mpd_i;
            ace_mpwe_n <= 1'b1; ace_mpoe_n <= 1'b1;
          end else if (ace_cnt == ($clog2(ACE_CYCLES+1))'(ACE_CYCLES)) begin
            ace_mpce_n  <= 1'b1; ace_mpd_oe <= 1'b0;   // then CE* and the data drivers
            vme_dtack_n <= 1'b0;
            vstate      <= V_ACK;
          end
        end
        default: begin  // V_ACK: hold DTACK* until the data strobe is released
          if (!ds_s[1]) begin
            vme_dtack_n  <= 1'b1;
            vme_buf_oe_n <= 1'b1;
            vme_buf_dir  <= 1'b0;
            vstate       <= V_IDLE;
          end
        end
      endcase
    end
  end

  // ---------------- front-panel LEDs ----------------
  logic [LED_STRETCH-1:0] led_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) led_cnt <= '0;
    else if (access_pulse) led_cnt <= '1;
    else if (led_cnt != '0) led_cnt <= led_cnt - 1'b1;

  assign leds = {|i2c_busy, status1_in[1], status1_in[0], led_cnt != '0};

  logic unused;
  assign unused = ^i2c_done;

endmodule
