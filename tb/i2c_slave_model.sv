// i2c_slave_model: behavioural I2C device with 256 byte registers, standing in
// for the management interface of an SFP or MiniPOD module in testbenches.
// Responds to device address ADDR: a write "S, dev+W, reg, data..., P" stores
// bytes from register reg on; a read "S, dev+W, reg, Sr, dev+R, ..." returns
// bytes from reg on. sda_oe = 1 pulls SDA low. STRETCH > 0 holds SCL low for
// that many time units after every falling SCL edge (clock stretching).
module i2c_slave_model #(
  parameter logic [6:0] ADDR    = 7'h50,
  parameter int         STRETCH = 0
) (
  input  logic scl,
  input  logic sda,
  output logic sda_oe,
  output logic scl_oe
);
  typedef enum {IDLE, ADDRB, REGB, WDATA, RDATA, IGNORE} st_t;
  st_t         st = IDLE;
  logic [7:0]  mem [256];
  logic [7:0]  ptr = '0, sh = '0;
  int          bitn = 0;
  bit          rd_nack = 0;
  int          n_start = 0, n_stop = 0;

  initial begin
    sda_oe = 1'b0;
    scl_oe = 1'b0;
    for (int i = 0; i < 256; i++) mem[i] = 8'(i * 7 + 3);
  end

  always @(negedge sda) if (scl) begin st = ADDRB; bitn = 0; sda_oe = 1'b0; n_start++; end
  always @(posedge sda) if (scl) begin st = IDLE; bitn = 0; sda_oe = 1'b0; n_stop++; end

  always @(posedge scl) if (st != IDLE && st != IGNORE) begin
    bitn++;
    if (bitn <= 8 && st != RDATA) sh = {sh[6:0], sda};
    if (bitn == 9 && st == RDATA) rd_nack = sda;
  end

  always @(negedge scl) begin
    if (STRETCH > 0) begin scl_oe = 1'b1; #(STRETCH); scl_oe = 1'b0; end
  end

  always @(negedge scl) if (st != IDLE && st != IGNORE) begin
    if (st == RDATA) begin
      if (bitn == 0 || bitn < 8) sda_oe = ~sh[7 - bitn];
      else if (bitn == 8) sda_oe = 1'b0;                       // master acknowledge slot
      else begin                                               // bitn == 9
        bitn = 0;
        if (rd_nack) st = IGNORE;
        else begin ptr++; sh = mem[ptr]; sda_oe = ~sh[7]; end
      end
    end else if (bitn == 8) begin
      if (st == ADDRB && sh[7:1] != ADDR) st = IGNORE;
      else sda_oe = 1'b1;                                      // acknowledge
    end else if (bitn == 9) begin
      sda_oe = 1'b0;
      bitn = 0;
      case (st)
        ADDRB: if (sh[0]) begin st = RDATA; sh = mem[ptr]; sda_oe = ~sh[7]; end
               else st = REGB;
        REGB:  begin ptr = sh; st = WDATA; end
        WDATA: begin mem[ptr] = sh; ptr++; end
        default: ;
      endcase
    end
  end
endmodule
