// setup_regs: the setup IP, a register file written and read over SPI
// that configures the other Virtex-6 blocks.
//
// SPI, mode 0, MSB first, one 24-bit frame per access while cs_n is low:
//   bit 23      1 = read, 0 = write
//   bits 22:16  register address
//   bits 15:0   write data (write) / read data driven on miso (read)
// sclk, cs_n and mosi are synchronised to clk (two flip-flops), so sclk
// must be at most clk/8 (miso settles about three clocks after a falling
// sclk edge). A write takes effect on the clock after the 24th
// rising sclk edge; read data is sampled from the register at the 8th
// rising edge and shifted out on the following falling edges.
//
// Register map (16 bits each):
//   0x00 ID (read only, 0x4E44)      0x01 PSA alpha gate, samples
//   0x02 PSA beta gate, samples      0x03 PSA threshold above baseline
//   0x04 PSA delta_t, Q4.12          0x05 [4:0] delay tap, [8] edge swap
//   0x06 channel enables             0x07 [3:0] scope re-arm (self clearing)
//   0x08-0x0B probe p: [4:0] source, [9:8] trigger type
//   0x0C-0x0F probe p level          0x10-0x13 probe p post-trigger samples
//   0x14 [13:0] scope read address, [15:14] probe
//   0x15 scope read data (RO)        0x16 [3:0] probes frozen (RO)
//   0x17-0x1A probe p oldest sample address after freezing (RO)
//   0x1B inspection analog selects [4:0], [12:8]
//   0x1C inspection digital selects [5:0], [13:8]
//   0x1D events lost, all channels (RO)
// The document says only that the setup IP holds the configuration
// registers, reached over the SPI link from the Virtex-5, and names the
// delay tap and the PSA gates among them; the frame format, the map and
// the reset values (the document's gates of 30 ns and 140 ns, 6 and 28
// samples) are this design's.
module setup_regs
  import neda_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  output setup_t      cfg,
  output logic [3:0]  scope_arm,      // one-clock pulses
  input  logic [15:0] scope_rd_data,
  input  logic [3:0]  scope_frozen,
  input  logic [13:0] scope_oldest [N_PROBES],
  input  logic [15:0] lost_total
);

  localparam logic [15:0] ID = 16'h4E44;

  // ---- synchronisers
  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end
  logic rise, fall, active;
  assign active = !cs_s[1];
  assign rise   = active && sclk_s[1] && !sclk_s[2];
  assign fall   = active && !sclk_s[1] && sclk_s[2];

  // ---- register read mux
  function automatic logic [15:0] rd_reg(input logic [6:0] a, input setup_t c,
                                         input logic [15:0] sd, input logic [3:0] fr,
                                         input logic [13:0] old [N_PROBES], input logic [15:0] lost);
    logic [15:0] r;
    r = '0;
    unique case (a)
      7'h00: r = ID;
      7'h01: r = 16'(c.alpha);
      7'h02: r = 16'(c.beta);
      7'h03: r = 16'(c.thr);
      7'h04: r = c.delta_t;
      7'h05: r = {7'b0, c.edge_swap, 3'b0, c.iodelay_tap};
      7'h06: r = c.ch_en;
      7'h08, 7'h09, 7'h0A, 7'h0B: r = {6'b0, c.probe_trig[a[1:0]], 3'b0, c.probe_src[a[1:0]]};
      7'h0C, 7'h0D, 7'h0E, 7'h0F: r = c.probe_level[a[1:0]];
      7'h10, 7'h11, 7'h12, 7'h13: r = {2'b0, c.probe_post[a[1:0]]};
      7'h14: r = {c.scope_rd_probe, c.scope_rd_addr};
      7'h15: r = sd;
      7'h16: r = {12'b0, fr};
      7'h17, 7'h18, 7'h19, 7'h1A: r = {2'b0, old[2'(a - 7'h17)]};
      7'h1B: r = {3'b0, c.insp_analog[1], 3'b0, c.insp_analog[0]};
      7'h1C: r = {2'b0, c.insp_digital[1], 2'b0, c.insp_digital[0]};
      7'h1D: r = lost;
      default: r = '0;
    endcase
    return r;
  endfunction

  // ---- frame shifter
  logic [4:0]  bitcnt;
  logic [23:0] sh_in;
  logic [15:0] sh_out;
  logic        wr_now;
  logic [6:0]  wr_addr;
  logic [15:0] wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= '0; sh_in <= '0; sh_out <= '0; miso <= 1'b0;
      wr_now <= 1'b0; wr_addr <= '0; wr_data <= '0;
    end else begin
      wr_now <= 1'b0;
      if (!active) begin
        bitcnt <= '0;
        miso   <= 1'b0;
      end else begin
        if (rise) begin
          sh_in  <= {sh_in[22:0], mosi_s[1]};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 5'd7)
            sh_out <= rd_reg({sh_in[5:0], mosi_s[1]}, cfg, scope_rd_data,
                             scope_frozen, scope_oldest, lost_total);
          if (bitcnt == 5'd23 && !sh_in[22]) begin
            wr_now  <= 1'b1;
            wr_addr <= sh_in[21:15];
            wr_data <= {sh_in[14:0], mosi_s[1]};
          end
        end
        if (fall && bitcnt >= 5'd8) begin
          miso   <= sh_out[15];
          sh_out <= {sh_out[14:0], 1'b0};
        end
      end
    end
  end

  // ---- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg              <= '0;
      cfg.alpha        <= 6'd6;
      cfg.beta         <= 8'd28;
      cfg.thr          <= 14'd100;
      cfg.delta_t      <= 16'h0400;
      cfg.ch_en        <= '1;
      cfg.insp_analog[1]  <= 5'd16;
      cfg.insp_digital[1] <= 6'd32;
      for (int p = 0; p < N_PROBES; p++) cfg.probe_post[p] <= 14'd8192;
      scope_arm        <= '0;
    end else begin
      scope_arm <= '0;
      if (wr_now) begin
        unique case (wr_addr)
          7'h01: cfg.alpha       <= wr_data[5:0];
          7'h02: cfg.beta        <= wr_data[7:0];
          7'h03: cfg.thr         <= wr_data[13:0];
          7'h04: cfg.delta_t     <= wr_data;
          7'h05: begin
            cfg.iodelay_tap <= wr_data[4:0];
            cfg.edge_swap   <= wr_data[8];
          end
          7'h06: cfg.ch_en       <= wr_data;
          7'h07: scope_arm       <= wr_data[3:0];
          7'h08, 7'h09, 7'h0A, 7'h0B: begin
            cfg.probe_src[wr_addr[1:0]]  <= wr_data[4:0];
            cfg.probe_trig[wr_addr[1:0]] <= wr_data[9:8];
          end
          7'h0C, 7'h0D, 7'h0E, 7'h0F: cfg.probe_level[wr_addr[1:0]] <= wr_data;
          7'h10, 7'h11, 7'h12, 7'h13: cfg.probe_post[wr_addr[1:0]]  <= wr_data[13:0];
          7'h14: begin
            cfg.scope_rd_probe <= wr_data[15:14];
            cfg.scope_rd_addr  <= wr_data[13:0];
          end
          7'h1B: begin
            cfg.insp_analog[0] <= wr_data[4:0];
            cfg.insp_analog[1] <= wr_data[12:8];
          end
          7'h1C: begin
            cfg.insp_digital[0] <= wr_data[5:0];
            cfg.insp_digital[1] <= wr_data[13:8];
          end
          default: ;
        endcase
      end
    end
  end

endmodule
