// spi_master: the Virtex-5 end of the SPI link to the Virtex-6 setup
// registers (the V6 SPI IP next to the embedded processor).
//
// A register access is requested with a one-clock `req` carrying read/
// write, a 7-bit address and 16 bits of write data. The master sends one
// 24-bit frame, MSB first, in SPI mode 0: cs_n goes low, mosi changes
// while sclk is low, the slave samples on the rising sclk edge and the
// master samples miso on the rising edge too. Frame: bit 23 read, bits
// 22:16 address, bits 15:0 data; on a read the slave returns the register
// in the last 16 bits. `done` pulses for one clock when the frame is over,
// with `rdata` holding the 16 bits read (reads) or what the slave shifted
// out (writes). `busy` is high from the request to `done`; requests while
// busy are ignored.
//
// Timing: sclk is clk / (2 * HALF). The slave (setup_regs) samples the SPI
// lines through two flip-flops and drives miso about three clocks after a
// falling sclk edge, so HALF must be at least 4; the default 8 keeps a
// margin. cs_n is held low HALF clocks before the first and after the
// last edge. done comes (24 * 2 + 1) * HALF + 1 clocks after req: one
// half period of lead, 24 high and 23 low half periods, one of tail.
//
// The document names the SPI link and the V6 SPI IP only; the frame
// format (shared with setup_regs), the mode and the clock rate are this
// design's.
module spi_master #(
  parameter int unsigned HALF = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        rd,
  input  logic [6:0]  addr,
  input  logic [15:0] wdata,
  output logic        busy,
  output logic        done,
  output logic [15:0] rdata,
  output logic        sclk,
  output logic        cs_n,
  output logic        mosi,
  input  logic        miso
);

  localparam int unsigned TW = $clog2(HALF + 1);

  typedef enum logic [1:0] {M_IDLE, M_LEAD, M_BITS, M_TAIL} mstate_e;
  mstate_e       state;
  logic [23:0]   sh;      // frame, MSB leaves first
  logic [15:0]   rx;
  logic [4:0]    nbit;    // bits still to send in M_BITS
  logic [TW-1:0] tick;    // clocks left in this half period

  assign busy = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE;
      sh    <= '0;
      rx    <= '0;
      nbit  <= '0;
      tick  <= '0;
      sclk  <= 1'b0;
      cs_n  <= 1'b1;
      mosi  <= 1'b0;
      done  <= 1'b0;
      rdata <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_IDLE: if (req) begin
          sh    <= {rd, addr, wdata};
          cs_n  <= 1'b0;
          mosi  <= rd;
          tick  <= TW'(HALF - 1);
          state <= M_LEAD;
        end
        M_LEAD: begin
          // cs_n low with the first bit on mosi for one half period
          if (tick == '0) begin
            sclk  <= 1'b1;
            nbit  <= 5'd23;
            tick  <= TW'(HALF - 1);
            state <= M_BITS;
          end else tick <= tick - 1'b1;
        end
        M_BITS: begin
          if (tick == '0) begin
            tick <= TW'(HALF - 1);
            if (sclk) begin
              // falling edge: shift out the next bit
              sclk <= 1'b0;
              if (nbit == '0) state <= M_TAIL;
              else begin
                sh   <= {sh[22:0], 1'b0};
                mosi <= sh[22];
                nbit <= nbit - 1'b1;
              end
            end else begin
              // rising edge
              sclk <= 1'b1;
            end
          end else begin
            tick <= tick - 1'b1;
            // sample miso on the clock of the rising edge's half period end
            if (sclk && tick == TW'(1) && nbit < 5'd16) rx <= {rx[14:0], miso};
          end
        end
        M_TAIL: begin
          if (tick == '0) begin
            cs_n  <= 1'b1;
            mosi  <= 1'b0;
            rdata <= rx;
            done  <= 1'b1;
            state <= M_IDLE;
          end else tick <= tick - 1'b1;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
