// tb_cmx_topo_tx: 16 receiver payloads per crossing, each delivered with a
// one-clock valid in the phase-2 clock and sometimes missing, into
// cmx_topo_tx. After the phase-3 edge sof must be high and the 12 fibres must
// carry word 0 of the frame (module i at frame bits 96i.., missing modules as
// zeros, fibre f = frame bits 128f..), then words 1..3 on the next clocks.
module tb_cmx_topo_tx;
  import l1calo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0]              phase = 0;
  logic [15:0][95:0]       payload;
  logic [15:0]             valid;
  logic [11:0][31:0]       fibre;
  logic                    sof;
  logic [12*128-1:0]       frame;
  int checks = 0, failures = 0, n_missing = 0;

  cmx_topo_tx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) phase <= phase + 2'd1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    payload = '0; valid = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int bc = 0; bc < 500; bc++) begin
      while (phase != 2'd2) @(negedge clk);
      frame = '0;
      for (int i = 0; i < 16; i++) begin
        payload[i] = {$urandom, $urandom, $urandom};
        valid[i]   = ($urandom_range(7) != 0);
        if (valid[i]) frame[96*i +: 96] = payload[i];
        else n_missing++;
      end
      @(negedge clk);           // phase-2 edge captured the payloads
      valid = '0;
      payload = ~payload;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        checks++;
        if (sof !== (k == 0)) failures++;
        for (int f = 0; f < 12; f++) begin
          checks++;
          if (fibre[f] !== frame[128*f + 32*k +: 32]) begin
            failures++;
            if (failures < 5) $display("FAIL bc %0d fibre %0d word %0d: %h exp %h",
                                       bc, f, k, fibre[f], frame[128*f + 32*k +: 32]);
          end
        end
      end
    end
    checks++;
    if (n_missing == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
