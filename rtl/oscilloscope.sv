// oscilloscope: the Oscilloscope IP, four probes on internal signals.
//
// Each probe picks one of N_SRC 16-bit source signals and writes it, one
// sample per 200 MHz clock, into its own DEPTH-word circular buffer
// (16k words = 32 kB). When the probe's trigger occurs it writes the
// trigger sample and `post` more samples and then freezes; the buffer then
// holds DEPTH - post - 1 samples from before the trigger.
// oldest[p] gives the address of the oldest sample of a frozen buffer.
// A pulse on arm[p] clears the freeze and restarts the probe; after reset
// every probe is running.
//
// Trigger types per probe (scope_trig_e): a PSA trigger request on any
// channel (ext_trig), the source crossing `level` upwards, crossing it
// downwards, or an immediate software trigger. The read port returns word
// rd_addr of probe rd_probe one clock later.
//
// The document gives the four probes, the 16k-word circular buffers, the
// freeze on trigger and software control of trigger type and time; the
// list of trigger types and the meaning of the time (post-trigger count)
// are this design's choices.
module oscilloscope
  import neda_pkg::*;
#(
  parameter int unsigned NP    = N_PROBES,
  parameter int unsigned N_SRC = 32,
  parameter int unsigned DEPTH = 16384
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [15:0]              src [N_SRC],
  input  logic                     ext_trig,
  input  logic [NP-1:0][4:0]       probe_src,
  input  logic [NP-1:0][1:0]       probe_trig,
  input  logic [NP-1:0][15:0]      probe_level,
  input  logic [NP-1:0][$clog2(DEPTH)-1:0] probe_post,
  input  logic [NP-1:0]            arm,
  input  logic [1:0]               rd_probe,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [15:0]              rd_data,
  output logic [NP-1:0]            frozen,
  output logic [$clog2(DEPTH)-1:0] oldest [NP]
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0] rd_word [NP];

  for (genvar p = 0; p < NP; p++) begin : g_probe
    logic [15:0]   mem [DEPTH];
    logic [15:0]   val, val_q;
    logic [AW-1:0] wp;
    logic [AW-1:0] left;      // post-trigger samples still to write
    logic          triggered, armed_q, hit;
    scope_trig_e   tt;

    assign val = src[probe_src[p]];
    assign tt  = scope_trig_e'(probe_trig[p]);

    always_comb begin
      unique case (tt)
        TRIG_EXT:  hit = ext_trig;
        TRIG_RISE: hit = (val >= probe_level[p]) && (val_q < probe_level[p]);
        TRIG_FALL: hit = (val < probe_level[p]) && (val_q >= probe_level[p]);
        TRIG_SOFT: hit = armed_q;
        default:   hit = 1'b0;
      endcase
    end

    always_ff @(posedge clk) if (!frozen[p]) mem[wp] <= val;
    always_ff @(posedge clk) rd_word[p] <= mem[rd_addr];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp        <= '0;
        left      <= '0;
        triggered <= 1'b0;
        frozen[p] <= 1'b0;
        val_q     <= '0;
        armed_q   <= 1'b1;
        oldest[p] <= '0;
      end else begin
        val_q   <= val;
        armed_q <= 1'b0;
        if (arm[p]) begin
          triggered <= 1'b0;
          frozen[p] <= 1'b0;
          armed_q   <= 1'b1;
        end else if (!frozen[p]) begin
          wp <= wp + 1'b1;
          if (!triggered && hit) begin
            triggered <= 1'b1;
            left      <= probe_post[p];
            if (probe_post[p] == '0) begin
              frozen[p] <= 1'b1;
              oldest[p] <= wp + 1'b1;
            end
          end else if (triggered) begin
            left <= left - 1'b1;
            if (left == AW'(1)) begin
              frozen[p] <= 1'b1;
              oldest[p] <= wp + 1'b1;
            end
          end
        end
      end
    end
  end

  logic [1:0] rp_q;
  always_ff @(posedge clk) rp_q <= rd_probe;
  assign rd_data = rd_word[rp_q];

endmodule
