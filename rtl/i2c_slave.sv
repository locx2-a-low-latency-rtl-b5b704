// I2C slave and configuration register file of LOCx2.
//
// Gives an I2C master access to NREG 16-bit registers. SCL and SDA are
// sampled with the 40 MHz reference clock (the only clock present before
// the PLL has locked) through two-flop synchronizers; start, stop and the
// SCL edges are found from the synchronized samples, so SCL may run at up to
// a few MHz. Protocol, all bytes MSB first:
//   write: S, addr+W, A, ptr, A, data[15:8], A, data[7:0], A, (next register ...), P
//   read:  S, addr+W, A, ptr, A, Sr, addr+R, A, data[15:8], A, data[7:0], A/N, ..., P
// A register is written when its low byte is acknowledged; the pointer then
// moves to the next register (also on reads). SDA is open drain: `sda_oe`
// high pulls the line low. Register 0 holds the PLL settings (type
// pll_cfg_t); the others are spare read/write registers. That the chip has
// 16-bit registers configured through an I2C slave, and that the VCO band,
// charge-pump current, loop bandwidth and filter order are programmable,
// follows LOCx2; the address, the register map, the protocol framing and
// the reset values are this design's choice.
module i2c_slave
  import locx2_pkg::*;
#(
  parameter logic [6:0]  I2C_ADDR = 7'h20,
  parameter int unsigned NREGS    = NREG
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  output logic [NREGS-1:0][15:0] regs
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned PW = (NREGS > 1) ? $clog2(NREGS) : 1;

  typedef enum logic [3:0] {
    IDLE, ADDR, ADDR_ACK, PTR, PTR_ACK, WDATA, WDATA_ACK, RDATA, RDATA_ACK
  } state_t;

  state_t      state;
  logic [2:0]  scl_s, sda_s;
  logic        scl_rise, scl_fall, start_c, stop_c;
  logic [7:0]  sh;
  logic [3:0]  nbits;
  logic        rw, hi_byte, acked;
  logic [PW-1:0] ptr;
  logic [7:0]  hi_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end

  assign scl_rise = !scl_s[2] &&  scl_s[1];
  assign scl_fall =  scl_s[2] && !scl_s[1];
  assign start_c  =  scl_s[1] && scl_s[2] &&  sda_s[2] && !sda_s[1];
  assign stop_c   =  scl_s[1] && scl_s[2] && !sda_s[2] &&  sda_s[1];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(NREGS-1)) ? '0 : p + 1'b1;
  endfunction

  logic [7:0] tx_byte;   // byte a read sends next
  assign tx_byte = hi_byte ? regs[ptr][15:8] : regs[ptr][7:0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= IDLE;
      sh      <= '0;
      nbits   <= '0;
      rw      <= 1'b0;
      hi_byte <= 1'b1;
      acked   <= 1'b0;
      ptr     <= '0;
      hi_data <= '0;
      sda_oe  <= 1'b0;
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
      regs[0] <= 16'(PLL_CFG_DEFAULT);
    end else if (start_c) begin
      state  <= ADDR;
      nbits  <= '0;
      sda_oe <= 1'b0;
    end else if (stop_c) begin
      state  <= IDLE;
      sda_oe <= 1'b0;
    end else begin
      unique case (state)
        IDLE: sda_oe <= 1'b0;

        ADDR, PTR, WDATA: begin
          if (scl_rise) begin
            sh    <= {sh[6:0], sda_s[1]};
            nbits <= nbits + 1'b1;
          end else if (scl_fall && nbits == 4'd8) begin
            nbits <= '0;
            unique case (state)
              ADDR: if (sh[7:1] == I2C_ADDR) begin
                      rw     <= sh[0];
                      sda_oe <= 1'b1;
                      state  <= ADDR_ACK;
                    end else begin
                      state  <= IDLE;
                    end
              PTR: begin
                      ptr     <= PW'(sh);
                      hi_byte <= 1'b1;
                      sda_oe  <= 1'b1;
                      state   <= PTR_ACK;
                    end
              default: begin   // WDATA
                      if (hi_byte) begin
                        hi_data <= sh;
                      end else begin
                        regs[ptr] <= {hi_data, sh};
                        ptr       <= next_ptr(ptr);
                      end
                      hi_byte <= !hi_byte;
                      sda_oe  <= 1'b1;
                      state   <= WDATA_ACK;
                    end
            endcase
          end
        end

        ADDR_ACK, PTR_ACK, WDATA_ACK: begin
          if (scl_fall) begin
            if (state == ADDR_ACK && rw) begin
              // first data bit of a read goes out now
              sh     <= {tx_byte[6:0], 1'b0};
              sda_oe <= !tx_byte[7];
              nbits  <= 4'd1;
              state  <= RDATA;
            end else begin
              sda_oe <= 1'b0;
              state  <= (state == ADDR_ACK) ? PTR : WDATA;
            end
          end
        end

        RDATA: begin
          if (scl_fall) begin
            if (nbits == 4'd8) begin
              sda_oe <= 1'b0;          // release for the master's acknowledge
              state  <= RDATA_ACK;
              if (!hi_byte) ptr <= next_ptr(ptr);
              hi_byte <= !hi_byte;
            end else begin
              sda_oe <= !sh[7];
              sh     <= {sh[6:0], 1'b0};
              nbits  <= nbits + 1'b1;
            end
          end
        end

        RDATA_ACK: begin
          if (scl_rise) begin
            acked <= !sda_s[1];
          end else if (scl_fall) begin
            if (acked) begin
              sh     <= {tx_byte[6:0], 1'b0};
              sda_oe <= !tx_byte[7];
              nbits  <= 4'd1;
              state  <= RDATA;
            end else begin
              state  <= IDLE;
            end
          end
        end

        default: state <= IDLE;
      endcase
    end
endmodule
