// frame_mem: one 64-word complex frame buffer (memories X, X1, X2, X3 and Y).
//
// A register array of N complex words with NRD combinational read ports and NWR
// write ports (written at the clock edge). Several ports are needed because a
// radix-4 stage reads four words and writes four words in every cycle. Beside the
// data the buffer keeps a frame-full flag and the frame's direction tag, which form
// the handshake between the unit that writes a frame and the unit that reads it:
// the writer pulses fill_i (with dir_i) after its last write, the reader pulses
// drain_i once it no longer needs the contents. fill_i wins if both are pulsed.
// Writes to the same address from two ports in one cycle are not allowed (the
// higher-numbered port wins); the address patterns of the stages never do this.
//
// Timing: read data is valid in the same cycle as the address; writes, fill and
// drain take effect at the next rising edge. full_o/dir_o reset to empty/forward.
// The data words are not reset. The 64 words per memory follow the processor's block
// diagram; the port counts and the full flag are design choices.
module frame_mem #(
  parameter int unsigned W   = 8,
  parameter int unsigned N   = 64,
  parameter int unsigned NRD = 4,
  parameter int unsigned NWR = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // write ports
  input  logic [NWR-1:0]               we_i,
  input  logic [$clog2(N)-1:0]         waddr_i [NWR],
  input  logic signed [W-1:0]          wre_i   [NWR],
  input  logic signed [W-1:0]          wim_i   [NWR],
  // read ports
  input  logic [$clog2(N)-1:0]         raddr_i [NRD],
  output logic signed [W-1:0]          rre_o   [NRD],
  output logic signed [W-1:0]          rim_o   [NRD],
  // frame handshake
  input  logic                         fill_i,
  input  fft_pkg::dir_e                dir_i,
  input  logic                         drain_i,
  output logic                         full_o,
  output fft_pkg::dir_e                dir_o
);

  logic signed [W-1:0] mem_re [N];
  logic signed [W-1:0] mem_im [N];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++) begin
      if (we_i[p]) begin
        mem_re[waddr_i[p]] <= wre_i[p];
        mem_im[waddr_i[p]] <= wim_i[p];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rre_o[p] = mem_re[raddr_i[p]];
      rim_o[p] = mem_im[raddr_i[p]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_o <= 1'b0;
      dir_o  <= fft_pkg::DIR_FWD;
    end else if (fill_i) begin
      full_o <= 1'b1;
      dir_o  <= dir_i;
    end else if (drain_i) begin
      full_o <= 1'b0;
    end
  end

  // Handshake rule: a frame is only filled into an empty buffer, or into one whose
  // previous frame is released in the same clock.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    fill_i |-> !full_o || drain_i)
    else $error("frame filled over a frame that was not released");

endmodule
