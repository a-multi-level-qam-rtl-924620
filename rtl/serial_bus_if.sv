// serial_bus_if: two-wire serial control interface (CLOCK = scl, DATA = sda)
// through which the QAM order, the equalizing mode (T or T/2), the loop
// selection and LMS adaptation are set, and the lock status is read.
//
// Protocol (an I2C-style slave of this design's own; the chip only states
// that its modes are set over a serial bus):
//   write: START, {DEV_ADDR, 0}, ACK, register pointer, ACK, data, ACK, ...
//   read : START, {DEV_ADDR, 1}, ACK, data, master ACK/NACK, ..., STOP
// The pointer auto-increments after every data byte.  Registers:
//   0x00 CTRL   (RW, reset CTRL_RESET): [1:0] QAM order 0:4 1:16 2:64 3:256,
//                [2] 1 = T-spaced / 0 = T/2-spaced, [4:3] loop select,
//                [5] LMS adaptation enable
//   0x01 STATUS (RO): value of the `status` input
// scl and sda are synchronised by two flip-flops and sampled with `clk`, which
// must be at least ~10x the scl rate.  sda_oe=1 pulls DATA low (open drain).
module serial_bus_if #(
  parameter logic [6:0] DEV_ADDR   = 7'h1C,
  parameter logic [7:0] CTRL_RESET = 8'h3E
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       scl,
  input  logic       sda_i,
  output logic       sda_oe,
  output logic [7:0] ctrl,
  input  logic [7:0] status
);

  typedef enum logic [3:0] {
    S_IDLE, S_ADDR, S_AACK, S_PTR, S_PACK, S_WDATA, S_WACK, S_RDATA, S_RACK
  } state_e;

  state_e     st;
  logic [2:0] scl_sy, sda_sy;
  logic       scl_r, scl_f, sda_r, sda_f, scl_h, sda_h;
  logic [7:0] sh, tx, ptr;
  logic [3:0] bitcnt;
  logic       rw, mack;

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_sy <= '1;
      sda_sy <= '1;
    end else begin
      scl_sy <= {scl_sy[1:0], scl};
      sda_sy <= {sda_sy[1:0], sda_i};
    end
  end

  assign scl_h = scl_sy[1];
  assign sda_h = sda_sy[1];
  assign scl_r = scl_sy[1] & ~scl_sy[2];
  assign scl_f = ~scl_sy[1] & scl_sy[2];
  assign sda_r = sda_sy[1] & ~sda_sy[2];
  assign sda_f = ~sda_sy[1] & sda_sy[2];

  function automatic logic [7:0] rd_reg(logic [7:0] a, logic [7:0] c, logic [7:0] s);
    unique case (a)
      8'h00:   return c;
      8'h01:   return s;
      default: return 8'h00;
    endcase
  endfunction

  logic [7:0] rd_cur, rd_nxt;
  assign rd_cur = rd_reg(ptr, ctrl, status);
  assign rd_nxt = rd_reg(ptr + 8'd1, ctrl, status);

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= S_IDLE;
      sda_oe <= 1'b0;
      sh     <= '0;
      tx     <= '0;
      ptr    <= '0;
      bitcnt <= '0;
      rw     <= 1'b0;
      mack   <= 1'b0;
      ctrl   <= CTRL_RESET;
    end else if (scl_h && !scl_r && sda_f) begin          // START
      st     <= S_ADDR;
      bitcnt <= '0;
      sda_oe <= 1'b0;
    end else if (scl_h && !scl_r && sda_r) begin          // STOP
      st     <= S_IDLE;
      sda_oe <= 1'b0;
    end else if (scl_r) begin
      unique case (st)
        S_ADDR, S_PTR, S_WDATA: begin
          sh     <= {sh[6:0], sda_h};
          bitcnt <= bitcnt + 1'b1;
        end
        S_RDATA: bitcnt <= bitcnt + 1'b1;
        S_RACK:  mack   <= ~sda_h;
        default: ;
      endcase
    end else if (scl_f) begin
      unique case (st)
        S_ADDR:
          if (bitcnt == 4'd8) begin
            if (sh[7:1] == DEV_ADDR) begin
              st     <= S_AACK;
              rw     <= sh[0];
              sda_oe <= 1'b1;
            end else begin
              st <= S_IDLE;
            end
          end
        S_AACK: begin
          bitcnt <= '0;
          if (rw) begin
            st     <= S_RDATA;
            tx     <= rd_cur;
            sda_oe <= ~rd_cur[7];
          end else begin
            st     <= S_PTR;
            sda_oe <= 1'b0;
          end
        end
        S_PTR:
          if (bitcnt == 4'd8) begin
            ptr    <= sh;
            st     <= S_PACK;
            sda_oe <= 1'b1;
          end
        S_PACK: begin
          st     <= S_WDATA;
          bitcnt <= '0;
          sda_oe <= 1'b0;
        end
        S_WDATA:
          if (bitcnt == 4'd8) begin
            if (ptr == 8'h00) ctrl <= sh;
            ptr    <= ptr + 1'b1;
            st     <= S_WACK;
            sda_oe <= 1'b1;
          end
        S_WACK: begin
          st     <= S_WDATA;
          bitcnt <= '0;
          sda_oe <= 1'b0;
        end
        S_RDATA:
          if (bitcnt == 4'd8) begin
            st     <= S_RACK;
            sda_oe <= 1'b0;
          end else begin
            sda_oe <= ~tx[3'd7 - bitcnt[2:0]];
          end
        S_RACK:
          if (mack) begin
            ptr    <= ptr + 1'b1;
            tx     <= rd_nxt;
            sda_oe <= ~rd_nxt[7];
            bitcnt <= '0;
            st     <= S_RDATA;
          end else begin
            st <= S_IDLE;
          end
        default: ;
      endcase
    end
  end

endmodule
