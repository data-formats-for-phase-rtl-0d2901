// bp_rx: CMX end of one 25-line backplane link (see bp_tx for the line
// protocol). The lines are registered once on arrival.
//   160 Mbit/s mode: a rising edge on line 24 marks word 0. The next three
//     words follow; line 24 of word 1 is the parity bit and must be 0 on words
//     2 and 3. After word 3 the 96-bit payload is presented with valid for one
//     clock and par_err set if the data plus parity bit hold an even number of
//     ones. A rising edge inside a frame, or line 24 high on word 2 or 3, sets
//     frame_err for that frame (a new edge restarts alignment). The receiver
//     finds word 0 from line 24 alone, without the local phase.
//   legacy mode: the Day-1 word is taken at local phase 2, mid-crossing, and
//     day1_valid pulses with day1_par_err for a failed odd parity check.
// The frame checks and the use of the local phase for Day-1 data are this
// design's choices. Latency: payload valid 2 clocks after word 3 leaves bp_tx.
module bp_rx
  import l1calo_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [1:0]            phase,
  input  logic                  legacy,
  input  logic [BP_LINES-1:0]   lines,
  output logic [PAYLOAD_W-1:0]  payload,
  output logic                  valid,
  output logic                  par_err,
  output logic                  frame_err,
  output logic [BP_DATA-1:0]    day1,
  output logic                  day1_valid,
  output logic                  day1_par_err
);
  logic [BP_LINES-1:0]              rx_q;
  logic                             clk_prev;
  logic [2:0][BP_DATA-1:0]          words;  // words 0..2 of the frame
  logic [1:0]                       slot;   // next expected word
  logic                             in_frame;
  logic                             par_q;
  logic                             bad_q;
  logic                             edge_seen;

  assign edge_seen = rx_q[BP_DATA] && !clk_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_q         <= '0;
      clk_prev     <= 1'b1;
      words        <= '0;
      slot         <= '0;
      in_frame     <= 1'b0;
      par_q        <= 1'b0;
      bad_q        <= 1'b0;
      payload      <= '0;
      valid        <= 1'b0;
      par_err      <= 1'b0;
      frame_err    <= 1'b0;
      day1         <= '0;
      day1_valid   <= 1'b0;
      day1_par_err <= 1'b0;
    end else begin
      rx_q       <= lines;
      clk_prev   <= rx_q[BP_DATA];
      valid      <= 1'b0;
      day1_valid <= 1'b0;
      if (legacy) begin
        in_frame <= 1'b0;
        if (phase == 2'd2) begin
          day1         <= rx_q[BP_DATA-1:0];
          day1_valid   <= 1'b1;
          day1_par_err <= ~(^rx_q);
        end
      end else if (edge_seen) begin
        // word 0; an edge in the middle of a frame is a framing fault
        words[0]  <= rx_q[BP_DATA-1:0];
        slot      <= 2'd1;
        bad_q     <= 1'b0;
        if (in_frame) frame_err <= 1'b1;
        in_frame  <= 1'b1;
      end else if (in_frame) begin
        unique case (slot)
          2'd1: begin
            words[1] <= rx_q[BP_DATA-1:0];
            par_q    <= rx_q[BP_DATA];
            slot     <= 2'd2;
          end
          2'd2: begin
            words[2] <= rx_q[BP_DATA-1:0];
            if (rx_q[BP_DATA]) bad_q <= 1'b1;
            slot     <= 2'd3;
          end
          default: begin
            payload   <= {rx_q[BP_DATA-1:0], words};
            valid     <= 1'b1;
            par_err   <= ~(^{rx_q[BP_DATA-1:0], words, par_q});
            frame_err <= bad_q | rx_q[BP_DATA];
            in_frame  <= 1'b0;
            slot      <= 2'd0;
          end
        endcase
      end
    end
  end
endmodule
