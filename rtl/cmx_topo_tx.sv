// cmx_topo_tx: the CMX's real-time output towards the topological processor.
// The 96-bit payloads received from the N_LINK processor modules of a crate
// are gathered every bunch crossing into one frame of N_FIBRE x 128 bits,
// module i at frame bits 96i+95..96i, unused bits zero, and fibre f carries
// frame bits 128f+127..128f. Each fibre is handed to its transceiver as four
// 32-bit words per crossing (one per 160 MHz clock), lowest word first; sof
// marks word 0. 32 bits at 160 MHz is 5.12 Gbit/s, i.e. a 6.4 Gbit/s line
// with 8b/10b coding.
// From the specification: 12 fibres per CMX, 6.4 Gbit/s, 8b/10b, 128 bits
// per crossing per fibre, the module counts (14 CPMs, 16 JEMs). This design's
// choices: the frame layout, the 32-bit transceiver width, the sof sideband,
// and sending a module that delivered no valid payload in the crossing as
// zeros. The 8b/10b coder and serialiser belong to the transceiver and are
// not part of this block.
// Timing: payloads are captured on their valid; at the clock edge where
// phase == 3 the gathered frame is launched and word 0 appears, words 1..3
// follow on the edges where phase == 0, 1, 2.
module cmx_topo_tx
  import l1calo_pkg::*;
#(
  parameter int N_LINK  = 16,
  parameter int N_FIBRE = 12,
  parameter int FIBRE_W = 32
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [1:0]                           phase,
  input  logic [N_LINK-1:0][PAYLOAD_W-1:0]     payload,
  input  logic [N_LINK-1:0]                    valid,
  output logic [N_FIBRE-1:0][FIBRE_W-1:0]      fibre,
  output logic                                 sof
);
  localparam int BITS_PER_BC = FIBRE_W * WORDS_PER_BC;   // 128
  localparam int FRAME_W     = N_FIBRE * BITS_PER_BC;

  logic [N_LINK-1:0][PAYLOAD_W-1:0] gather_q;
  logic [FRAME_W-1:0]               frame_q;
  logic [FRAME_W-1:0]               frame_new;

  always_comb begin
    frame_new = '0;
    frame_new[N_LINK*PAYLOAD_W-1:0] = gather_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gather_q <= '0;
      frame_q  <= '0;
      fibre    <= '0;
      sof      <= 1'b0;
    end else begin
      for (int i = 0; i < N_LINK; i++)
        if (valid[i])
          gather_q[i] <= payload[i];
        else if (phase == 2'd3)
          gather_q[i] <= '0;
      if (phase == 2'd3) begin
        frame_q <= frame_new;
        sof     <= 1'b1;
        for (int f = 0; f < N_FIBRE; f++)
          fibre[f] <= frame_new[f*BITS_PER_BC +: FIBRE_W];
      end else begin
        sof <= 1'b0;
        for (int f = 0; f < N_FIBRE; f++)
          fibre[f] <= frame_q[f*BITS_PER_BC + FIBRE_W*(32'(phase) + 1) +: FIBRE_W];
      end
    end
  end

  initial assert (N_LINK * PAYLOAD_W <= FRAME_W)
    else $error("cmx_topo_tx: %0d links do not fit %0d fibres", N_LINK, N_FIBRE);
endmodule
