// tb_alu_top: end-to-end test of the push-button calculator through its
// board-level ports only, with short debounce and scan times.
// Each round resets the design (or, now and then, keeps going), enters two
// random operands with the switches and Enter, then presses Enter and Sign
// at random. After every step the four display digits are read back from
// the multiplexed Anode/seven_seg lines and compared with what an integer
// model of the calculator says must be shown: the switch value during
// entry, then A+B, A-B or A mod 3 in the current mode, with "F" for
// overflow and "-" for a negative result in the leftmost digit. The
// switches are scrambled after both operands are stored to check that they
// are locked. Each mechanism (both entry phases, each operation in each
// mode, the mod-3 -> add wrap, overflow, negative, sign toggle, switch lock,
// reset) is counted and must occur at least once.
module tb_alu_top;
  import tb_seg_pkg::*;
  localparam int unsigned DEB = 2;
  localparam int unsigned REF = 2;
  logic       Clk = 0, reset;
  logic [7:0] Input;
  logic       b_Enter, b_Sign;
  logic [3:0] Anode;
  logic [6:0] seven_seg;
  int checks = 0, failures = 0;

  alu_top #(.DEBOUNCE_CYCLES(DEB), .REFRESH_CYCLES(REF)) dut (
    .Clk, .reset, .Input, .b_Enter, .b_Sign, .Anode, .seven_seg
  );

  always #5 Clk = ~Clk;

  initial begin
    repeat (2_000_000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic press_enter();
    b_Enter = 1;
    repeat (DEB + 4) @(posedge Clk);
    #1;
    b_Enter = 0;
    repeat (DEB + 4) @(posedge Clk);
    #1;
  endtask

  task automatic press_sign();
    b_Sign = 1;
    repeat (DEB + 4) @(posedge Clk);
    #1;
    b_Sign = 0;
    repeat (DEB + 4) @(posedge Clk);
    #1;
  endtask

  // Read the four digits over two scan rounds, leftmost first
  task automatic read_display(output string shown);
    byte d [4];
    bit  seen [4];
    for (int k = 0; k < 4; k++) seen[k] = 0;
    for (int c = 0; c < 8 * REF; c++) begin
      for (int k = 0; k < 4; k++)
        if (!Anode[k]) begin
          d[k] = decode(seven_seg);
          seen[k] = 1;
        end
      @(posedge Clk);
      #1;
    end
    shown = "";
    for (int k = 3; k >= 0; k--) shown = {shown, seen[k] ? string'(d[k]) : "?"};
  endtask

  // model
  int  phase;             // 0 A entry, 1 B entry, 2 add, 3 sub, 4 mod
  bit  smode;
  logic [7:0] ma, mb;
  int  n_entry_a, n_entry_b, n_add[2], n_sub[2], n_mod[2], n_wrap, n_ovf, n_neg,
       n_toggle, n_lock, n_reset;

  function automatic string expected();
    int x, y, r, q, mag;
    bit neg, ovf;
    byte c0;
    x = smode ? int'($signed(ma)) : int'(ma);
    y = smode ? int'($signed(mb)) : int'(mb);
    neg = 0;
    ovf = 0;
    case (phase)
      0: r = int'(Input);
      1: r = int'(Input);
      2, 3: begin
        r = (phase == 2) ? x + y : x - y;
        neg = r < 0;
        ovf = smode ? (r < -128 || r > 127) : (r > 255);
      end
      default: begin
        q = x / 3;
        if (x < 0 && q * 3 != x) q = q - 1;
        r = x - 3 * q;
      end
    endcase
    mag = (neg ? -r : r) & 255;
    c0 = ovf ? "F" : (neg ? "-" : " ");
    return $sformatf("%c%0d%0d%0d", c0, mag / 100, (mag / 10) % 10, mag % 10);
  endfunction

  task automatic check_display(input string what);
    string shown, want;
    read_display(shown);
    want = expected();
    check(shown == want, $sformatf("%s: phase %0d smode %0d A=%0d B=%0d shows \"%s\" want \"%s\"",
                                   what, phase, smode, ma, mb, shown, want));
    if (shown == want && phase >= 2) begin
      if (want[0] == "F") n_ovf++;
      if (want[0] == "-") n_neg++;
    end
  endtask

  initial begin
    int r;
    reset = 1;
    b_Enter = 0;
    b_Sign = 0;
    Input = 0;
    {n_entry_a, n_entry_b, n_wrap, n_ovf, n_neg, n_toggle, n_lock, n_reset} = '0;
    n_add = '{0, 0};
    n_sub = '{0, 0};
    n_mod = '{0, 0};
    repeat (3) @(posedge Clk);
    #1;
    reset = 0;
    phase = 0;
    smode = 0;
    for (int round = 0; round < 150; round++) begin
      if (round > 0 && $urandom_range(3) != 0) begin
        reset = 1;
        @(posedge Clk);
        #1;
        reset = 0;
        phase = 0;
        smode = 0;
        n_reset++;
      end
      // operand A entry: the display follows the switches
      if (phase == 0) begin
        Input = 8'($urandom);
        repeat (2) @(posedge Clk);
        #1;
        check_display("A entry");
        n_entry_a++;
        ma = Input;
        press_enter();
        phase = 1;
        // operand B entry
        Input = 8'($urandom);
        repeat (2) @(posedge Clk);
        #1;
        check_display("B entry");
        n_entry_b++;
        mb = Input;
        press_enter();
        phase = 2;
        check_display("first result");
        n_add[smode]++;
      end
      for (int s = 0; s < 8; s++) begin
        r = $urandom_range(9);
        if (r < 6) begin
          press_enter();
          if (phase == 4) n_wrap++;
          phase = (phase < 4) ? phase + 1 : 2;
          case (phase)
            2: n_add[smode]++;
            3: n_sub[smode]++;
            default: n_mod[smode]++;
          endcase
        end else if (r < 9) begin
          press_sign();
          smode = ~smode;
          n_toggle++;
        end else begin
          Input = 8'($urandom);
          repeat (2) @(posedge Clk);
          #1;
          n_lock++;
        end
        check_display("operation");
      end
    end
    check(n_entry_a > 0, "operand A entry never seen");
    check(n_entry_b > 0, "operand B entry never seen");
    check(n_add[0] > 0 && n_add[1] > 0, "A+B not seen in both modes");
    check(n_sub[0] > 0 && n_sub[1] > 0, "A-B not seen in both modes");
    check(n_mod[0] > 0 && n_mod[1] > 0, "A mod 3 not seen in both modes");
    check(n_wrap > 0, "mod 3 -> A+B wrap never seen");
    check(n_ovf > 0, "overflow never shown");
    check(n_neg > 0, "negative result never shown");
    check(n_toggle > 0, "sign never toggled");
    check(n_lock > 0, "switch lock never exercised");
    check(n_reset > 0, "reset never applied");
    $display("mechanisms: entryA=%0d entryB=%0d add=%0d/%0d sub=%0d/%0d mod=%0d/%0d wrap=%0d ovf=%0d neg=%0d toggle=%0d lock=%0d reset=%0d",
             n_entry_a, n_entry_b, n_add[0], n_add[1], n_sub[0], n_sub[1], n_mod[0], n_mod[1],
             n_wrap, n_ovf, n_neg, n_toggle, n_lock, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
