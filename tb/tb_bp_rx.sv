// tb_bp_rx: drives the backplane lines of bp_rx directly with the link
// protocol (word 0 marked by the rising edge of line 24, parity on line 24 of
// word 1, line 24 low on words 2 and 3). Frames come back to back, with gaps,
// with a wrong parity bit and with a broken clock pattern. Checks the payload,
// par_err and frame_err of each frame, that valid comes exactly 2 clocks
// after word 3 is on the lines, and the Day-1 legacy mode (word sampled at
// phase 2, odd parity check).
module tb_bp_rx;
  import l1calo_pkg::*;
  logic        clk = 0, rst_n = 0, legacy = 0;
  logic [1:0]  phase = 0;
  logic [24:0] lines;
  logic [95:0] payload;
  logic        valid, par_err, frame_err;
  logic [23:0] day1;
  logic        day1_valid, day1_par_err;
  int checks = 0, failures = 0;
  int n_perr = 0, n_ferr = 0, n_ok = 0, n_d1 = 0, n_d1err = 0;

  bp_rx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) phase <= phase + 2'd1;

  // Send one frame; kind 0 good, 1 wrong parity, 2 line 24 high on word 2.
  // Kind 2 needs parity 1 so that line 24 stays high from word 1 into word 2
  // (a 0-to-1 step there would be read as a new word 0).
  task automatic send_frame(input logic [95:0] din, input int kind);
    logic [95:0] d = din;
    logic par;
    if (kind == 2 && (^d)) d[0] = ~d[0];
    par = ~(^d);
    if (kind == 1) par = ~par;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      lines[23:0] = d[24*k +: 24];
      lines[24]   = (k == 0) ? 1'b1 : (k == 1) ? par : (k == 2 && kind == 2);
    end
    // valid must rise exactly two clocks later
    @(negedge clk);
    lines = '0;
    checks++;
    if (valid) failures++;
    @(negedge clk);
    checks += 4;
    if (!valid) begin
      failures++;
      $display("FAIL no valid for kind %0d", kind);
    end
    if (payload !== d) failures++;
    if (par_err !== (kind == 1)) failures++;
    if (frame_err !== (kind == 2)) failures++;
    n_ok   += (kind == 0);
    n_perr += par_err;
    n_ferr += frame_err;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lines = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 1500; f++) begin
      automatic logic [95:0] d = {$urandom, $urandom, $urandom};
      automatic int kind = ($urandom_range(9) == 0) ? 1 : ($urandom_range(9) == 0) ? 2 : 0;
      send_frame(d, kind);
    end
    // back-to-back frames: valid once per four clocks
    begin
      automatic logic [95:0] d[3];
      for (int f = 0; f < 3; f++) d[f] = {$urandom, $urandom, $urandom};
      fork
        for (int f = 0; f < 3; f++)
          for (int k = 0; k < 4; k++) begin
            @(negedge clk);
            lines = {(k == 0) ? 1'b1 : (k == 1) ? ~(^d[f]) : 1'b0, d[f][24*k +: 24]};
          end
        begin
          for (int f = 0; f < 3; f++) begin
            repeat (4) @(negedge clk);
            if (f == 0) repeat (2) @(negedge clk);
            checks += 2;
            if (!valid || payload !== d[f]) failures++;
            if (par_err || frame_err) failures++;
          end
        end
      join
      @(negedge clk);
      lines = '0;
    end
    // legacy mode
    legacy = 1;
    for (int b = 0; b < 400; b++) begin
      automatic logic [23:0] w = 24'($urandom);
      automatic logic bad = ($urandom_range(7) == 0);
      while (phase != 2'd3) @(negedge clk);
      lines = {~(^w) ^ bad, w};     // changes before the edge at phase 0
      repeat (4) begin
        @(negedge clk);
        if (day1_valid) begin
          checks += 2;
          n_d1++;
          if (day1 !== w) begin
            failures++;
            $display("FAIL day1 %h exp %h", day1, w);
          end
          if (day1_par_err !== bad) failures++;
          n_d1err += day1_par_err;
        end
      end
    end
    checks += 5;
    if (n_ok == 0 || n_perr == 0 || n_ferr == 0) failures++;
    if (n_d1 < 390) failures++;
    if (n_d1err == 0) failures++;
    $display("good %0d, parity errors %0d, frame errors %0d, day1 %0d (%0d bad)",
             n_ok, n_perr, n_ferr, n_d1, n_d1err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
