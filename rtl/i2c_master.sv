// i2c_master: single-byte register access to an I2C device (SFP or MiniPOD
// optical module, or any device with 8-bit register addresses).
//
// A start pulse with rw, dev_addr, reg_addr and wdata runs one transaction:
//   write: S, dev+W, A, reg, A, wdata, A, P
//   read:  S, dev+W, A, reg, A, Sr, dev+R, A, rdata, NACK, P
// busy is high for the whole transaction; done pulses at its end, when rdata
// (read) and nack (any byte not acknowledged, which ends the transaction with a
// stop) are valid. Every bus step (start, bit, stop) takes four quarter periods
// of DIV clk cycles each, so SCL runs at f_clk/(4*DIV): 100 kHz for DIV = 100 at
// 40 MHz. Both lines are open drain: *_oe = 1 pulls the line low. The master
// waits in the high phase of SCL while a slave stretches the clock.
// From the description: I2C access to the internal registers of the optical
// components, a write carrying a data byte and a read returning one. The
// transaction format, SCL rate and status flags are this implementation's own.
module i2c_master #(
  parameter int unsigned DIV = 100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       rw,          // 1 = read
  input  logic [6:0] dev_addr,
  input  logic [7:0] reg_addr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       done,
  output logic       nack,
  output logic [7:0] rdata,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       scl_i,
  input  logic       sda_i
);

  typedef enum logic [1:0] {OP_IDLE, OP_START, OP_BIT, OP_STOP} op_t;
  op_t op;

  logic [$clog2(DIV+1)-1:0] tick_cnt;
  logic                     tick;
  logic [1:0]               ph;       // quarter period within a step
  logic [3:0]               bitn;     // 0..8 inside a byte, 8 = acknowledge
  logic [2:0]               step;     // position in the transaction
  logic [7:0]               sh;       // byte being sent or received
  logic                     rx_byte;  // current byte is received
  logic                     rw_l;
  logic [6:0]               dev_l;
  logic [7:0]               reg_l, wd_l;

  logic                     stretch;  // SCL released but held low by a slave

  assign tick    = (tick_cnt == '0);
  assign stretch = (ph == 2'd2) && !scl_i;

  // byte sent at each step of the sequence
  function automatic logic [7:0] tx_byte(input logic [2:0] s);
    case (s)
      3'd1:    return {dev_l, 1'b0};
      3'd2:    return reg_l;
      3'd3:    return rw_l ? 8'h00 : wd_l;
      3'd5:    return {dev_l, 1'b1};
      default: return 8'h00;
    endcase
  endfunction

  // next operation after a step: write 0:S 1:dev 2:reg 3:data 7:P ;
  // read 0:S 1:dev 2:reg 4:Sr 5:dev 6:rx 7:P
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= OP_IDLE; tick_cnt <= '0; ph <= '0; bitn <= '0; step <= '0;
      sh <= '0; rx_byte <= 1'b0; rw_l <= 1'b0; dev_l <= '0; reg_l <= '0; wd_l <= '0;
      busy <= 1'b0; done <= 1'b0; nack <= 1'b0; rdata <= '0;
      scl_oe <= 1'b0; sda_oe <= 1'b0;
    end else begin
      done <= 1'b0;
      if (op == OP_IDLE) begin
        tick_cnt <= '0;
        if (start) begin
          rw_l <= rw; dev_l <= dev_addr; reg_l <= reg_addr; wd_l <= wdata;
          busy <= 1'b1; nack <= 1'b0; step <= 3'd0; ph <= 2'd0;
          op <= OP_START;
        end
      end else begin
        // quarter-period timer; held while SCL is released but still low (stretch)
        if (!stretch) begin
          tick_cnt <= tick ? ($clog2(DIV+1))'(DIV - 1) : tick_cnt - 1'b1;
        end
        if (tick && !stretch) begin
          ph <= ph + 2'd1;
          case (op)
            OP_START: case (ph)
              2'd0: begin sda_oe <= 1'b0; end
              2'd1: begin scl_oe <= 1'b0; end
              2'd2: begin sda_oe <= 1'b1; end
              default: begin
                scl_oe <= 1'b1;
                op <= OP_BIT; bitn <= '0;
                step    <= (step == 3'd0) ? 3'd1 : 3'd5;
                sh      <= tx_byte((step == 3'd0) ? 3'd1 : 3'd5);
                rx_byte <= 1'b0;
              end
            endcase
            OP_BIT: case (ph)
              2'd0: begin
                // acknowledge slot: released (slave ACK, or master NACK after rdata)
                if (bitn == 4'd8) sda_oe <= 1'b0;
                else              sda_oe <= rx_byte ? 1'b0 : ~sh[7];
              end
              2'd1: scl_oe <= 1'b0;
              2'd2: begin
                if (bitn == 4'd8) begin
                  if (!rx_byte && sda_i) nack <= 1'b1;
                end else begin
                  sh <= {sh[6:0], rx_byte ? sda_i : 1'b0};
                end
              end
              default: begin
                scl_oe <= 1'b1;
                if (bitn != 4'd8) bitn <= bitn + 4'd1;
                else begin
                  bitn <= '0;
                  if (rx_byte) begin
                    rdata <= sh;
                    op <= OP_STOP; step <= 3'd7;
                  end else if (nack) begin
                    op <= OP_STOP; step <= 3'd7;
                  end else begin
                    case (step)
                      3'd1: begin step <= 3'd2; sh <= tx_byte(3'd2); end
                      3'd2: if (rw_l) begin step <= 3'd4; op <= OP_START; end
                            else begin step <= 3'd3; sh <= tx_byte(3'd3); end
                      3'd5: begin step <= 3'd6; sh <= 8'h00; rx_byte <= 1'b1; end
                      default: begin op <= OP_STOP; step <= 3'd7; end
                    endcase
                  end
                end
              end
            endcase
            default: case (ph)  // OP_STOP
              2'd0: sda_oe <= 1'b1;
              2'd1: scl_oe <= 1'b0;
              2'd2: sda_oe <= 1'b0;
              default: begin
                op <= OP_IDLE; busy <= 1'b0; done <= 1'b1;
              end
            endcase
          endcase
        end
      end
    end
  end

endmodule
