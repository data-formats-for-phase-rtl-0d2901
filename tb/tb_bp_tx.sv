// tb_bp_tx: feeds bp_tx a new random payload and Day-1 word every bunch
// crossing and checks the 25 lines after each clock edge: in 160 Mbit/s mode
// word k carries payload bits 24k+23..24k and line 24 follows 1, odd parity,
// 0, 0; in legacy mode the Day-1 word and its odd parity are held for all four
// words. The payload is changed right after it is latched to check that the
// transmitter sends the latched copy. Both modes and the switch between them
// are exercised.
module tb_bp_tx;
  import l1calo_pkg::*;
  logic        clk = 0, rst_n = 0, legacy = 0;
  logic [1:0]  phase = 0;
  logic [95:0] payload, sent;
  logic [23:0] day1, sent_d1;
  logic [24:0] lines;
  int checks = 0, failures = 0, n_par1 = 0, n_legacy = 0;

  bp_tx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) phase <= phase + 2'd1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    payload = '0; day1 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int bc = 0; bc < 2000; bc++) begin
      // phase is 0 here: inputs stable for the latching edge
      payload = {$urandom, $urandom, $urandom};
      day1    = 24'($urandom);
      legacy  = (bc / 100) % 2 == 1;
      sent    = payload;
      sent_d1 = day1;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);   // lines now carry word k
        if (k == 0) begin payload = ~payload; day1 = ~day1; end
        checks++;
        if (legacy) begin
          if (lines !== {~(^sent_d1), sent_d1}) begin
            failures++;
            $display("FAIL legacy bc %0d word %0d: %h", bc, k, lines);
          end
        end else begin
          automatic logic l24 = (k == 0) ? 1'b1 : (k == 1) ? ~(^sent) : 1'b0;
          if (lines !== {l24, sent[24*k +: 24]}) begin
            failures++;
            $display("FAIL bc %0d word %0d: %h exp %h", bc, k, lines, {l24, sent[24*k +: 24]});
          end
        end
      end
      n_par1   += !legacy && ~(^sent);
      n_legacy += legacy;
    end
    checks += 2;
    if (n_par1 == 0)   failures++;
    if (n_legacy == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
