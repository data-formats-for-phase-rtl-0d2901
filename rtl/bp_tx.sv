// bp_tx: drives one 25-line CPM/JEM-to-CMX backplane link, clocked at
// 160 MHz with a 2-bit bunch-crossing phase (phase 0 starts a crossing).
//   legacy = 0 (160 Mbit/s): at phase 0 the 96-bit payload is latched and sent
//     as four 24-bit words, payload bits 24k+23..24k in the word of phase k.
//     Line 24 carries the 40 MHz data clock with the odd parity of the 96 data
//     bits folded into it: 1, parity, 0, 0 over the four words. The rising
//     edge therefore always marks word 0, and the pulse is one or two words
//     long depending on the parity.
//   legacy = 1 (Day-1, 40 Mbit/s): the 24-bit word is latched at phase 0 and
//     held for the whole crossing with its odd parity on line 24.
// The specification gives the line count, the rates, the four-word payload
// and that line 24 carries "a 40 MHz data clock encoded with a parity bit";
// the 1/parity/0/0 encoding is this design's choice.
// Timing: lines change on the clock edge at which phase == k, carrying word k.
module bp_tx
  import l1calo_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [1:0]            phase,
  input  logic                  legacy,
  input  logic [PAYLOAD_W-1:0]  payload,
  input  logic [BP_DATA-1:0]    day1,
  output logic [BP_LINES-1:0]   lines
);
  logic [PAYLOAD_W-1:0] buf_q;
  logic                 par_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      par_q <= 1'b0;
      lines <= '0;
    end else if (legacy) begin
      if (phase == 2'd0) lines <= {~(^day1), day1};
    end else if (phase == 2'd0) begin
      buf_q <= payload;
      par_q <= odd_parity(payload);
      lines <= {1'b1, payload[BP_DATA-1:0]};
    end else begin
      lines <= {(phase == 2'd1) ? par_q : 1'b0,
                buf_q[BP_DATA*phase +: BP_DATA]};
    end
  end
endmodule
