// tb_tlc_ped_fsm: checks the four-direction controller against a model.
//
// The model steps dir through N, E, S, W and, for each, the phases all-red,
// green, y1, y2 with their tick counts. Ticks come every 3 cycles. Every cycle
// dir, cnt, the 12 vehicle lamps, the 8 pedestrian lamps and the wrap pulse are
// compared with the model, and the number of cycles of one whole round
// (N to N) is checked against 4 x (ALL_RED + Y1 + Y2) x 3 plus the greens
// (GREEN for the main roads N and S, SIDE for E and W) x 3. A second
// instance with ALL_RED_TICKS = 0 and all roads main is checked to run
// green, y1, y2 only.
module tb_tlc_ped_fsm;
  import tlc_pkg::*;

  localparam int AR = 1, GT = 4, SG = 2, Y1 = 2, Y2 = 3, TPER = 3;
  localparam logic [3:0] MAIN = 4'b0101;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  tick = 1'b0;
  lamp_t lamp [4], lamp0 [4];
  ped_t  ped [4], ped0 [4];
  dir_e  dir, dir0;
  cnt_e  cnt, cnt0;
  logic  wrap, wrap0;
  int    checks = 0, failures = 0;
  int    walks [4] = '{0, 0, 0, 0};
  int    allreds = 0;

  tlc_ped_fsm #(.GREEN_TICKS(GT), .SIDE_GREEN_TICKS(SG), .MAIN_DIRS(MAIN),
                .Y1_TICKS(Y1), .Y2_TICKS(Y2), .ALL_RED_TICKS(AR)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .lamp(lamp), .ped(ped), .dir(dir), .cnt(cnt), .wrap(wrap));

  tlc_ped_fsm #(.GREEN_TICKS(GT), .SIDE_GREEN_TICKS(SG), .MAIN_DIRS(4'b1111),
                .Y1_TICKS(Y1), .Y2_TICKS(Y2), .ALL_RED_TICKS(0)) dut0 (
    .clk(clk), .rst_n(rst_n), .tick(tick), .lamp(lamp0), .ped(ped0), .dir(dir0), .cnt(cnt0), .wrap(wrap0));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state: phase 0 all red, 1 green, 2 y1, 3 y2 (not the RTL codes).
  typedef struct {
    int dir;
    int ph;
    int left;
    int first;
  } model_t;

  function automatic int ph_len(int ph, int ar, int dir, logic [3:0] main);
    case (ph)
      0: return ar;
      1: return main[dir] ? GT : SG;
      2: return Y1;
      default: return Y2;
    endcase
  endfunction

  function automatic void model_step(ref model_t m, input int ar, input logic [3:0] main);
    m.left--;
    if (m.left == 0) begin
      if (m.ph == 3) begin
        m.dir = (m.dir + 1) % 4;
        m.ph  = m.first;
      end else begin
        m.ph++;
      end
      m.left = ph_len(m.ph, ar, m.dir, main);
    end
  endfunction

  task automatic compare(input model_t m, input lamp_t l [4], input ped_t p [4],
                         input dir_e d, input cnt_e c, input logic w, input logic exp_w,
                         input string tag);
    logic [1:0] want_cnt;
    want_cnt = (m.ph == 0) ? 2'b11 : (m.ph == 1) ? 2'b00 : (m.ph == 2) ? 2'b01 : 2'b10;
    checks += 3;
    if (int'(d) != m.dir) begin failures++; $display("%s %0t: dir %0d expected %0d", tag, $time, d, m.dir); end
    if (c !== want_cnt)   begin failures++; $display("%s %0t: cnt %b expected %b", tag, $time, c, want_cnt); end
    if (w !== exp_w)      begin failures++; $display("%s %0t: wrap %b expected %b", tag, $time, w, exp_w); end
    for (int k = 0; k < 4; k++) begin
      lamp_t wl;
      ped_t  wp;
      wl = '{red: 1, yellow: 0, green: 0};
      wp = '{red: 1, green: 0};
      if (k == m.dir) begin
        if (m.ph == 1) wl = '{red: 0, yellow: 0, green: 1};
        if (m.ph >= 2) wl = '{red: 0, yellow: 1, green: 0};
        if (m.ph == 3) wp = '{red: 0, green: 1};
      end
      checks += 2;
      if (l[k] !== wl) begin failures++; $display("%s %0t: lamp[%0d] %b expected %b", tag, $time, k, l[k], wl); end
      if (p[k] !== wp) begin failures++; $display("%s %0t: ped[%0d] %b expected %b", tag, $time, k, p[k], wp); end
    end
  endtask

  initial begin
    model_t m, m0;
    int cyc = 0;
    int last_n_start = -1;
    int rounds = 0;
    logic ew, ew0;
    m  = '{dir: 0, ph: 0, left: AR, first: 0};
    m0 = '{dir: 0, ph: 1, left: GT, first: 1};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (cyc < 6000) begin
      cyc++;
      tick = (cyc % TPER == 0);
      #1;
      ew  = tick && m.left == 1 && m.ph == 3 && m.dir == 3;
      ew0 = tick && m0.left == 1 && m0.ph == 3 && m0.dir == 3;
      compare(m, lamp, ped, dir, cnt, wrap, ew, "main");
      compare(m0, lamp0, ped0, dir0, cnt0, wrap0, ew0, "no-all-red");
      if (m.ph == 3) walks[m.dir]++;
      if (m.ph == 0) allreds++;
      checks++;
      if (cnt0 == CNT_ALL_RED) begin failures++; $display("all-red seen with ALL_RED_TICKS = 0"); end
      @(posedge clk);
      if (tick) begin
        model_step(m, AR, MAIN);
        model_step(m0, 0, 4'b1111);
      end
      // round length: cycles between successive entries of North all-red
      if (tick && m.dir == 0 && m.ph == 0 && m.left == AR) begin
        if (last_n_start >= 0) begin
          checks++;
          rounds++;
          if (cyc - last_n_start != (4 * (AR + Y1 + Y2) + 2 * GT + 2 * SG) * TPER) begin
            failures++;
            $display("round took %0d cycles", cyc - last_n_start);
          end
        end
        last_n_start = cyc;
      end
      @(negedge clk);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (walks[k] == 0) begin failures++; $display("no pedestrian walk for dir %0d", k); end
    end
    checks++;
    if (rounds == 0 || allreds == 0) begin failures++; $display("no complete round"); end
    $display("rounds %0d, walk cycles N/E/S/W %0d %0d %0d %0d", rounds, walks[0], walks[1], walks[2], walks[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
