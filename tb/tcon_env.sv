// tcon_env: simulation harness around tcon_top, used by the small and the
// full-size system testbenches. It holds
//  - a serial EEPROM model with the timing image (refuses the first address
//    byte and stretches SCL, so the load is retried once),
//  - an LVDS video source that starts after the timing is loaded with a
//    vertical blank, then sends FRAMES frames of HA x VA pixels in an HT x VT
//    raster; frame 2 uses the 6-bit LVDS format and frame 3 has FRC off,
//  - a gate-driver model on STV/CKV/OE,
// and checks every output pixel (decoded from the RSDS pair bits and lined up
// by STH) against a reference of the frame rate control, the counts of STH,
// TP, STV and CKV per frame, POL at every TP, and that the gate lines are
// scanned one at a time. With TWO_RUNS it then resets the controller, loads a
// column-inversion image and runs two more frames. Each mechanism that the
// design has (retry, clock stretch, repeated START, vertical-blank lines,
// dithering, saturation, FRC off, 6-bit input, inversion switch) is counted
// and must have happened.
`timescale 1ns/1ps
module tcon_env #(
  parameter int HA = 16, VA = 8, HT = 24, VT = 11,
  parameter int FRAMES = 6,
  parameter int TPR = 17, TPF = 19, CKR = 2, CKF = 14, OER = 0, OEF = 4,
  parameter bit TWO_RUNS = 1,
  parameter longint WATCHDOG = 64'd10_000_000
) (
  output logic            clk,
  output logic            rst_n,
  output logic [3:0][6:0] lvds_rx,
  output logic            lvds_mode8,
  output logic            frc_en,
  output logic            scl_i,
  output logic            sda_i,
  input  logic            scl_oe,
  input  logic            sda_oe,
  input  logic            cfg_done,
  input  logic [7:0]      cfg_retries,
  input  logic            sth, tp, pol, stv, ckv, oe,
  input  logic [8:0]      rsds_rise,
  input  logic [8:0]      rsds_fall
);

  logic e_scl_oe, e_sda_oe;
  assign scl_i = ~(scl_oe | e_scl_oe);
  assign sda_i = ~(sda_oe | e_sda_oe);

  i2c_eeprom_model #(.ADDR(7'h50), .NACK_FIRST(1), .STRETCH(150)) eep (
    .scl(scl_i), .sda(sda_i), .scl_oe(e_scl_oe), .sda_oe(e_sda_oe)
  );

  int n_on, cur_gate;
  row_driver_model #(.N(VA)) gd (.stv, .ckv, .oe, .n_on, .cur_gate);

  initial clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- reference -------------------------------------------
  function automatic logic [7:0] pix(input int x, input int y, input int g, input int c);
    if (x == HA - 1) return 8'(255 - (y % 4));          // saturation region
    return 8'(x * 37 + y * 101 + g * 53 + c * 71);
  endfunction

  function automatic logic [5:0] frc_ref(input logic [7:0] v, input int x, input int y,
                                         input int ph, input bit on);
    int rank;
    rank = (((y % 2) == 0) ? ((x % 2 == 0) ? 2 : 0) : ((x % 2 == 0) ? 1 : 3)) ^ ph;
    if (on && int'(v[1:0]) > rank && v[7:2] != 6'h3F) return v[7:2] + 6'd1;
    return v[7:2];
  endfunction

  typedef struct { logic [5:0] r, g, b; bit inc, sat, off, six; } exp_t;
  exp_t expq [$];

  // ---------------- image -----------------------------------------------
  task automatic load_image(input int mode);
    int w [9];
    w = '{HA, VA, HT, TPR, TPF, CKR, CKF, OER, OEF};
    for (int i = 0; i < 9; i++) begin
      eep.mem[2*i]   = 8'(w[i] >> 8);
      eep.mem[2*i+1] = 8'(w[i]);
    end
    eep.mem[18] = 8'(mode);            // inversion mode, FRC bit 2 = 0
  endtask

  // ---------------- video source ----------------------------------------
  bit  run_video = 0;
  int  gen_frame = 0, run_frames = FRAMES;
  int  ph_base = 1;                    // frame phase of the first locked frame
  int  cur_mode = 3;                   // inversion mode of this run
  int  n_inc = 0, n_sat = 0, n_off = 0, n_six = 0, n_blank_ckv = 0;
  int  n_sth = 0, n_tp = 0, n_stv = 0, n_ckv = 0, pol_ok_lines = 0;
  int  out_cnt = 0, out_line = 0, out_x = 0;
  int  gates_seen = 0, last_gate = 0, max_on = 0;
  bit  video_done = 0;

  task automatic send(input int x, input int y, input int g);
    logic [7:0] r, gg, b;
    logic d;
    bit m8, fe;
    exp_t e;
    d  = (x < HA) && (y < VA);
    m8 = (g != 2);
    fe = (g != 3);
    r  = d ? pix(x, y, g, 0) : 8'h00;
    gg = d ? pix(x, y, g, 1) : 8'h00;
    b  = d ? pix(x, y, g, 2) : 8'h00;
    lvds_mode8 = m8;
    frc_en     = fe;
    if (!m8) begin r = {r[7:2], 2'b00}; gg = {gg[7:2], 2'b00}; b = {b[7:2], 2'b00}; end
    if (m8) begin
      lvds_rx[0] = {gg[0], r[5], r[4], r[3], r[2], r[1], r[0]};
      lvds_rx[1] = {b[1], b[0], gg[5], gg[4], gg[3], gg[2], gg[1]};
      lvds_rx[2] = {d, 1'b0, 1'b0, b[5], b[4], b[3], b[2]};
      lvds_rx[3] = {1'b0, b[7], b[6], gg[7], gg[6], r[7], r[6]};
    end else begin
      // 6-bit format: the six bits sit where the 8-bit format puts bits 5..0
      lvds_rx[0] = {gg[2], r[7], r[6], r[5], r[4], r[3], r[2]};
      lvds_rx[1] = {b[3], b[2], gg[7], gg[6], gg[5], gg[4], gg[3]};
      lvds_rx[2] = {d, 1'b0, 1'b0, b[7], b[6], b[5], b[4]};
      lvds_rx[3] = 7'($urandom);
    end
    if (d) begin
      e.r = frc_ref(r, x, y, (ph_base + g) % 4, fe);
      e.g = frc_ref(gg, x, y, (ph_base + g) % 4, fe);
      e.b = frc_ref(b, x, y, (ph_base + g) % 4, fe);
      e.inc = (e.r != r[7:2]) || (e.g != gg[7:2]) || (e.b != b[7:2]);
      e.sat = fe && (r >= 8'd253);
      e.off = !fe;
      e.six = !m8;
      expq.push_back(e);
    end
  endtask

  initial begin
    lvds_rx = '0; lvds_mode8 = 1; frc_en = 1;
    forever begin
      @(negedge clk);
      if (run_video) begin
        // a blank period first, then the frames
        for (int y = VA; y < VT; y++)
          for (int x = 0; x < HT; x++) begin send(x, y, 0); @(negedge clk); end
        for (int g = 0; g < run_frames; g++) begin
          gen_frame = g;
          for (int y = 0; y < VT; y++)
            for (int x = 0; x < HT; x++) begin send(x, y, g); @(negedge clk); end
        end
        lvds_rx = '0;
        run_video = 0;
        video_done = 1;
      end
    end
  end

  // ---------------- output monitor --------------------------------------
  logic stv_d = 0, ckv_d = 0, tp_d = 0;
  int   out_frame;
  always @(negedge clk) if (rst_n) begin
    exp_t e;
    if (sth) begin
      check(out_cnt == 0, "STH only after the previous line is complete");
      out_cnt = HA;
      out_x = 0;
      n_sth++;
    end
    if (out_cnt > 0) begin
      logic [5:0] r, g, b;
      for (int k = 0; k < 3; k++) begin
        r[2*k] = rsds_rise[k];     r[2*k+1] = rsds_fall[k];
        g[2*k] = rsds_rise[3+k];   g[2*k+1] = rsds_fall[3+k];
        b[2*k] = rsds_rise[6+k];   b[2*k+1] = rsds_fall[6+k];
      end
      if (expq.size() == 0) check(0, "output pixel without input");
      else begin
        e = expq.pop_front();
        check(r == e.r && g == e.g && b == e.b,
              $sformatf("pixel x%0d line%0d: got %h %h %h exp %h %h %h",
                        out_x, out_line, r, g, b, e.r, e.g, e.b));
        n_inc += e.inc; n_sat += e.sat; n_off += e.off; n_six += e.six;
      end
      out_cnt--;
      out_x++;
      if (out_cnt == 0) out_line++;
    end
    if (tp && !tp_d) begin
      int ln, fr;
      n_tp++;
      ln = (n_tp - 1) % VA;
      fr = (n_tp - 1) / VA;
      if (cur_mode == 3) check(pol == 1'(((ph_base + fr) % 2) ^ (ln % 2)), $sformatf("POL pixel inversion tp%0d", n_tp));
      else               check(pol == 1'((ph_base + fr) % 2), $sformatf("POL column inversion tp%0d", n_tp));
      pol_ok_lines++;
    end
    if (stv && !stv_d) n_stv++;
    if (ckv && !ckv_d) begin
      n_ckv++;
      check(oe, "OE high at CKV rise");
      if (stv == 0 && gd.sr == '0) n_blank_ckv++;
    end
    if (n_on > max_on) max_on = n_on;
    if (n_on == 1 && cur_gate != last_gate) begin
      check(cur_gate == last_gate + 1 || (cur_gate == 1), "gate order");
      last_gate = cur_gate;
      gates_seen++;
    end
    stv_d = stv; ckv_d = ckv; tp_d = tp;
  end

  // ---------------- sequence --------------------------------------------
  task automatic one_run(input int mode, input int frames);
    int n_start0;
    cur_mode = mode;
    load_image(mode);
    n_start0 = eep.n_start;
    eep.nacks_left = 1;
    n_sth = 0; n_tp = 0; n_stv = 0; n_ckv = 0; gates_seen = 0; last_gate = 0;
    expq.delete();
    out_cnt = 0; out_line = 0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!cfg_done && !sth && !tp && !stv && !ckv && !oe, "outputs idle before loading");
    wait (cfg_done);
    check(cfg_retries == 8'd1, $sformatf("load retried once (%0d)", cfg_retries));
    check(eep.n_start - n_start0 >= 3, "START and repeated START used");
    check(eep.n_stretch > 0, "SCL stretched by the EEPROM");
    repeat (5) @(negedge clk);
    run_frames = frames;
    video_done = 0;
    run_video = 1;
    wait (video_done);
    repeat (HT * 2) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d pixels not seen at the output", expq.size()));
    check(n_sth == frames * VA, $sformatf("STH %0d", n_sth));
    check(n_tp == frames * VA, $sformatf("TP %0d", n_tp));
    check(n_stv == frames, $sformatf("STV %0d", n_stv));
    check(gates_seen == frames * VA, $sformatf("gate lines scanned %0d", gates_seen));
    check(out_line == frames * VA, "output lines");
  endtask

  initial begin
    #(WATCHDOG * 10);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    one_run(3, FRAMES);                 // pixel inversion
    if (TWO_RUNS) one_run(2, 2);        // column inversion after a reload
    check(max_on == 1, "never two gate lines on together");
    check(n_blank_ckv > 0, "CKV runs through vertical blanking");
    check(n_inc > 0, "FRC added a step");
    check(n_sat > 0 || FRAMES < 2, "FRC saturated");
    check(n_off > 0 || FRAMES < 4, "frame with FRC off");
    check(n_six > 0 || FRAMES < 3, "frame in 6-bit LVDS format");
    check(pol_ok_lines > 0, "POL checked");
    $display("mechanisms: retry/stretch per run, dither %0d, saturate %0d, frc-off %0d, 6-bit %0d, blank CKV %0d, TP %0d",
             n_inc, n_sat, n_off, n_six, n_blank_ckv, pol_ok_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
