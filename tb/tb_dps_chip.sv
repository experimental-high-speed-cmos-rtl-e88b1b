// tb_dps_chip: the whole chip at 3 rows x 24 columns (3 words per row), driven
// pin by pin as the board would. Random photocurrents are loaded, the pixels
// are reset to 1400 mV, integrate, transfer, and are converted with an
// analog ramp of 390 + 4k mV at step k while the gray counter steps. The
// frame is read out and every pixel is compared with a code computed here:
// the largest k whose ramp level is still below the pixel's sense node,
// gray-coded. A second transfer after more integration checks the
// non-destructive readout; a conversion with the auxiliary ramp (the binary
// k) checks the Counter/Aux switch; a conversion with the comparators powered
// down must leave the memories unchanged. Readout timing: first word 3 clocks
// after Read Reset and one word per clock.
module tb_dps_chip;
  import dps_pkg::*;
  localparam int R = 3, C = 24, WORDS = C / 8;
  logic clk = 0, rst_n = 0;
  logic power_enable = 0, write_enable = 0, counter_aux = 1, counter_reset = 0, counter_step = 0;
  pixel_t aux_digital_ramp = 0;
  mv_t analog_ramp_mv = 0, reset_voltage_mv = 12'd1400;
  logic pixel_reset = 0, tx = 0, pg = 0, read_reset = 0;
  logic [63:0] data_out;
  logic data_valid;
  logic scene_we = 0;
  logic [8:0] scene_row = 0, scene_col = 0;
  logic [7:0] scene_rate = 0;
  int checks = 0, failures = 0;
  longint sense [R][C];
  int rate [R][C];
  logic [7:0] expv [R][C];

  dps_chip #(.R(R), .C(C)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_code(longint s);
    int k = -1;
    for (int i = 0; i < 256; i++) if (s > (longint'(390 + 4 * i) << 16)) k = i;
    return k;
  endfunction

  task automatic integrate(int cycles);
    pg = 1; repeat (cycles) @(negedge clk); pg = 0;
    tx = 1; @(negedge clk); tx = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        sense[r][c] -= longint'(rate[r][c]) * cycles;
        if (sense[r][c] < (longint'(400) << 16)) sense[r][c] = longint'(400) << 16;
      end
  endtask

  // one conversion; aux selects the binary auxiliary ramp
  task automatic convert(bit aux, bit powered);
    counter_aux = !aux; power_enable = powered;
    counter_reset = 1; @(negedge clk); counter_reset = 0;
    write_enable = 1;
    for (int k = 0; k < 256; k++) begin
      analog_ramp_mv = mv_t'(390 + 4 * k); aux_digital_ramp = 8'(k);
      counter_step = (k != 255);
      @(negedge clk);
    end
    counter_step = 0; write_enable = 0; power_enable = 0;
    if (powered)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          int k;
          k = ref_code(sense[r][c]);
          if (k >= 0) expv[r][c] = aux ? 8'(k) : (8'(k) ^ (8'(k) >> 1));
        end
  endtask

  task automatic read_check(string what);
    int lat = 0, n = 0;
    read_reset = 1; @(negedge clk); read_reset = 0;
    while (!data_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL %s: latency %0d", what, lat); end
    while (data_valid) begin
      for (int p = 0; p < 8; p++) begin
        int r, c;
        r = n / WORDS; c = (n % WORDS) * 8 + p;
        checks++;
        if (data_out[p*8 +: 8] !== expv[r][c]) begin
          failures++;
          $display("FAIL %s r%0d c%0d: %h expected %h", what, r, c, data_out[p*8 +: 8], expv[r][c]);
        end
      end
      n++;
      @(negedge clk);
    end
    checks++;
    if (n != R * WORDS) begin failures++; $display("FAIL %s: %0d words", what, n); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        rate[r][c] = $urandom_range(0, 255);
        scene_we = 1; scene_row = 9'(r); scene_col = 9'(c); scene_rate = 8'(rate[r][c]);
        @(negedge clk);
      end
    scene_we = 0;
    pixel_reset = 1; @(negedge clk); pixel_reset = 0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) sense[r][c] = longint'(1400) << 16;
    integrate(0);
    convert(0, 1);
    read_check("reset level");
    integrate(60000);
    convert(0, 1);
    read_check("first capture");
    integrate(100000);
    convert(1, 1);
    read_check("second capture, aux ramp");
    integrate(5000);
    convert(0, 0);
    read_check("powered down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
