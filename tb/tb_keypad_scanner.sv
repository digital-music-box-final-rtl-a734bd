// tb_keypad_scanner: presses every key of a modelled 4x4 matrix and checks the
// decoded key (layout 1 2 3 A / 4 5 6 B / 7 8 9 C / * 0 # D), that it is
// found within 4 scan ticks plus the synchroniser, that it is held after
// release, the one-hot song lines for keys 1..5 and none for other keys, that
// the columns rotate one step per tick, and that two keys in one column are
// ignored.
module tb_keypad_scanner;
  import music_box_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, scan_tick = 0;
  logic [3:0] rows, cols;
  logic [15:0] pressed = '0;
  key_t key;
  logic key_valid;
  logic [4:0] song;
  always #5 clk = ~clk;

  localparam int TICK = 7;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    scan_tick <= !rst && (cyc % TICK == TICK - 1);
  end

  keypad_scanner dut (.clk, .rst, .scan_tick, .rows, .cols, .key, .key_valid, .song);
  keypad_matrix_model kp (.pressed, .cols, .rows);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // cols must rotate by one at every tick
  logic [3:0] cols_prev;
  int rotations = 0;
  always @(posedge clk) begin
    cols_prev <= cols;
    if (!rst && $past(scan_tick)) begin
      check(cols == {cols_prev[2:0], cols_prev[3]}, $sformatf("cols %b after %b", cols, cols_prev));
      rotations++;
    end
  end

  // printed layout, row-major
  int layout [16] = '{1, 2, 3, 10, 4, 5, 6, 11, 7, 8, 9, 12, 14, 0, 15, 13};

  initial begin
    @(negedge clk);
    check(key_valid == 0 && song == 0, "nothing selected after reset");
    rst = 0;
    for (int rep = 0; rep < 2; rep++)
      for (int idx = 0; idx < 16; idx++) begin
        int k, waited;
        logic [4:0] exp_song;
        k = layout[idx];
        waited = 0;
        pressed = 16'(1) << idx;
        while (!(key_valid && int'(key) == k) && waited < 10 * TICK) begin
          @(negedge clk); waited++;
        end
        check(waited <= 4 * TICK + 3, $sformatf("key %0d found after %0d cycles", k, waited));
        exp_song = (k >= 1 && k <= 5) ? 5'(1 << (k - 1)) : 5'b0;
        check(key_valid && int'(key) == k && song == exp_song,
              $sformatf("key %0d: got key %0d valid %0d song %b expected %b", k, key, key_valid,
                        song, exp_song));
        pressed = '0;
        repeat (6 * TICK) @(negedge clk);
        check(int'(key) == k && song == exp_song, $sformatf("key %0d not held after release", k));
      end
    // two keys in one column (1 and 4): ignored
    pressed = '0; pressed[5] = 1;   // key 5 first
    repeat (6 * TICK) @(negedge clk);
    pressed = '0; pressed[0] = 1; pressed[4] = 1;
    repeat (8 * TICK) @(negedge clk);
    check(int'(key) == 5 && song == 5'b10000, $sformatf("two keys in a column changed key to %0d", key));
    check(rotations > 100, "columns rotated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
