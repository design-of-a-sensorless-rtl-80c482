`timescale 1ns/1ps
// serial_if: four-wire parameter port of the commutation IC.
//
// A frame starts on the falling edge of EN and lasts 14 SCLK periods: two
// address bits then twelve data bits, most significant bit first. DATA is
// sampled on the rising edge of SCLK. With R/W high the frame is a read: after
// the second address bit the addressed register is loaded into a shift
// register and driven on data_out (data_oe high), MSB first, advancing on each
// falling SCLK edge. With R/W low the twelve data bits are written to the
// addressed register after the 14th bit. Address 11 (speed) is read only.
// EN rising ends the frame; an incomplete write is discarded.
//
// The frame length, the 2+12 bit split and the register map are the
// document's. The SCLK edge used for sampling, MSB-first order, the R/W
// polarity and the split of the bidirectional DATA pin into data_in,
// data_out and data_oe are this design's choices. All pins are synchronised
// to clk with two flip-flops, so SCLK must be slower than clk/8.
module serial_if
  import bldc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // pins
  input  logic                    sclk,
  input  logic                    en,
  input  logic                    rw,       // 1 = read, 0 = write
  input  logic                    data_in,
  output logic                    data_out,
  output logic                    data_oe,
  // registers
  output logic signed [REG_W-1:0] dth,
  output logic        [REG_W-1:0] gi,
  output logic signed [REG_W-1:0] dtheta,
  input  logic signed [REG_W-1:0] speed,
  output logic                    wr_strobe  // one clock after any register write
);
  localparam int unsigned FRAME = 2 + REG_W;   // 14 SCLK per frame

  logic [2:0] sclk_s, en_s;
  logic [1:0] din_s, rw_s;
  logic       sclk_rise, sclk_fall, en_fall, en_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      en_s   <= '1;
      din_s  <= '0;
      rw_s   <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      en_s   <= {en_s[1:0], en};
      din_s  <= {din_s[0], data_in};
      rw_s   <= {rw_s[0], rw};
    end
  end

  assign sclk_rise = sclk_s[1] & ~sclk_s[2];
  assign sclk_fall = ~sclk_s[1] & sclk_s[2];
  assign en_fall   = ~en_s[1] & en_s[2];
  assign en_rise   = en_s[1] & ~en_s[2];

  logic             active;
  logic             is_read;
  logic [3:0]       bitcnt;
  logic [FRAME-1:0] shin;
  logic [REG_W-1:0] shout;
  logic [FRAME-1:0] shin_next;

  assign shin_next = {shin[FRAME-2:0], din_s[1]};

  function automatic logic [REG_W-1:0] read_reg(input reg_addr_e a,
                                                input logic signed [REG_W-1:0] d,
                                                input logic [REG_W-1:0] g,
                                                input logic signed [REG_W-1:0] t,
                                                input logic signed [REG_W-1:0] s);
    case (a)
      ADDR_DTH:    return d;
      ADDR_GI:     return g;
      ADDR_DTHETA: return t;
      default:     return s;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      is_read   <= 1'b0;
      bitcnt    <= '0;
      shin      <= '0;
      shout     <= '0;
      dth       <= DTH_RST;
      gi        <= GI_RST;
      dtheta    <= DTHETA_RST;
      wr_strobe <= 1'b0;
    end else begin
      wr_strobe <= 1'b0;
      if (en_fall) begin
        active  <= 1'b1;
        is_read <= rw_s[1];
        bitcnt  <= '0;
        shin    <= '0;
      end else if (en_rise) begin
        active <= 1'b0;
      end else if (active && sclk_rise && bitcnt < 4'(FRAME)) begin
        shin   <= shin_next;
        bitcnt <= bitcnt + 1'b1;
        if (bitcnt == 4'd1 && is_read)
          shout <= read_reg(reg_addr_e'(shin_next[1:0]), dth, gi, dtheta, speed);
        if (bitcnt == 4'(FRAME - 1) && !is_read) begin
          unique case (reg_addr_e'(shin_next[FRAME-1 -: 2]))
            ADDR_DTH:    dth    <= shin_next[REG_W-1:0];
            ADDR_GI:     gi     <= shin_next[REG_W-1:0];
            ADDR_DTHETA: dtheta <= shin_next[REG_W-1:0];
            ADDR_SPEED:  ;
          endcase
          wr_strobe <= 1'b1;
        end
      end else if (active && is_read && sclk_fall && bitcnt >= 4'd3) begin
        shout <= {shout[REG_W-2:0], 1'b0};
      end
    end
  end

  assign data_oe  = active & is_read & (bitcnt >= 4'd2);
  assign data_out = data_oe & shout[REG_W-1];

endmodule
