// tb_pixel_frontend_array: a 3 x 4 pixel front end with random photocurrents.
// After a reset to 1400 mV it integrates, transfers, and compares every
// pixel's comparator output, for many ramp levels, with a reference sense
// node computed here (reset level minus rate x integration cycles, in 1/65536
// mV, floored at 400 mV). A second integration and transfer must add to the
// first (non-destructive readout); comparators must be low when powered down;
// a new reset must restore the reset level.
module tb_pixel_frontend_array;
  localparam int R = 3, C = 4;
  logic clk = 0, rst_n = 0, pixel_reset = 0, pg = 0, tx = 0, power_enable = 0;
  logic [11:0] reset_voltage_mv = 12'd1400, analog_ramp_mv = '0;
  logic scene_we = 0;
  logic [8:0] scene_row = 0, scene_col = 0;
  logic [7:0] scene_rate = 0;
  logic [C-1:0] comp [R];
  int checks = 0, failures = 0;
  longint exp_sense [R][C];
  int unsigned rates [R][C];

  pixel_frontend_array #(.R(R), .C(C), .SAT_MV(400)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic integrate(int cycles);
    pg = 1;
    repeat (cycles) @(negedge clk);
    pg = 0; tx = 1;
    @(negedge clk);
    tx = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        exp_sense[r][c] -= longint'(rates[r][c]) * cycles;
        if (exp_sense[r][c] < (longint'(400) << 16)) exp_sense[r][c] = longint'(400) << 16;
      end
  endtask

  task automatic compare_all(string what);
    for (int mv = 380; mv <= 1420; mv += 13) begin
      analog_ramp_mv = 12'(mv);
      #1;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          logic e;
          e = power_enable && (exp_sense[r][c] > (longint'(mv) << 16));
          checks++;
          if (comp[r][c] !== e) begin
            failures++;
            $display("FAIL %s r%0d c%0d ramp=%0d comp=%b exp=%b", what, r, c, mv, comp[r][c], e);
          end
        end
    end
  endtask

  task automatic do_reset();
    pixel_reset = 1; @(negedge clk); pixel_reset = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) exp_sense[r][c] = longint'(1400) << 16;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        rates[r][c] = $urandom_range(0, 255);
        scene_we = 1; scene_row = 9'(r); scene_col = 9'(c); scene_rate = 8'(rates[r][c]);
        @(negedge clk);
      end
    scene_we = 0;
    rates[0][0] = 255; scene_we = 1; scene_row = 0; scene_col = 0; scene_rate = 255;
    @(negedge clk); scene_we = 0;
    do_reset();
    power_enable = 1;
    compare_all("reset level");
    integrate(100000 / 64);
    compare_all("first transfer");
    integrate(150000 / 64);
    compare_all("second transfer");
    integrate(40000);           // drives the brightest pixels to saturation
    compare_all("saturation");
    power_enable = 0;
    compare_all("powered down");
    power_enable = 1;
    do_reset();
    compare_all("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
