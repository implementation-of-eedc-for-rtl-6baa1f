// tb_mac_timer: checks the cycle timing at small parameters against an
// independent clock-count model: slot boundaries and slot IDs in the static
// segment, minislots and a dynamic slot stretched by bus activity, symbol
// window and NIT starts, and the wrap of the cycle counter from 63 to 0.
module tb_mac_timer;
  import flexray_pkg::*;
  localparam int CPM = 2, NS = 3, SMT = 5, NM = 6, MMT = 2, SYM = 3, NIT = 2;
  localparam int CYC_CLKS = CPM * (NS * SMT + NM * MMT + SYM + NIT);
  logic clk = 0, rst_n = 0, run = 0, bus_busy = 0;
  segment_t segment;
  logic [5:0] cycle;
  logic [10:0] slot_id;
  logic mt_tick, cycle_start, static_start, dyn_start, sym_start, nit_start, slot_start;
  int checks = 0, failures = 0;
  int t;           // clocks since the current cycle started
  int cyc_ref;
  int stretched = 0;

  mac_timer #(.CLKS_PER_MT(CPM), .N_STATIC(NS), .STATIC_SLOT_MT(SMT), .N_MINISLOTS(NM),
              .MINISLOT_MT(MMT), .SYMBOL_MT(SYM), .NIT_MT(NIT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0d cyc=%0d slot=%0d", what, t, cycle, slot_id); end
  endtask

  // In cycle 5 the bus is busy from minislot 1 to the middle of minislot 3,
  // so dynamic slot NS+2 covers minislots 1..3 and later slots shift by 2.
  function automatic int exp_dyn_slot(int ms, int c);
    if (c != 5 || ms < 1) return NS + 1 + ms;
    if (ms <= 3) return NS + 2;
    return NS + 2 + (ms - 3);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); run = 1;
    @(posedge clk); #1;
    chk(cycle_start && static_start && slot_start && slot_id == 1 && cycle == 0, "first cycle start");
    cyc_ref = 0;
    for (int c = 0; c < 66; c++) begin
      for (t = 0; t < CYC_CLKS; t++) begin
        int mt;
        mt = t / CPM;
        // drive bus activity for the stretched slot
        if (cyc_ref == 5 && mt >= NS * SMT + 1 * MMT && mt < NS * SMT + 3 * MMT + 1) bus_busy = 1;
        else bus_busy = 0;
        if (t % CPM == 0 && t > 0) begin
          if (mt < NS * SMT) begin
            chk(segment == SEG_STATIC && int'(slot_id) == mt / SMT + 1, "static slot id");
            chk(slot_start == (mt % SMT == 0), "static slot boundary");
          end else if (mt < NS * SMT + NM * MMT) begin
            int ms;
            ms = (mt - NS * SMT) / MMT;
            chk(segment == SEG_DYNAMIC, "dynamic segment");
            chk(dyn_start == (mt == NS * SMT), "dyn start");
            chk(int'(slot_id) == exp_dyn_slot(ms, cyc_ref), "dynamic slot id");
            if (cyc_ref == 5 && ms == 3 && slot_id == NS + 2) stretched++;
          end else if (mt < NS * SMT + NM * MMT + SYM) begin
            chk(segment == SEG_SYMBOL && sym_start == (mt == NS * SMT + NM * MMT), "symbol window");
          end else begin
            chk(segment == SEG_NIT && nit_start == (mt == NS * SMT + NM * MMT + SYM), "NIT");
          end
          chk(int'(cycle) == cyc_ref, "cycle count");
        end
        @(posedge clk); #1;
      end
      cyc_ref = (cyc_ref + 1) % 64;
      chk(cycle_start && slot_id == 1 && int'(cycle) == cyc_ref, "cycle start / wrap");
    end
    chk(stretched > 0, "dynamic slot was stretched");
    run = 0; @(posedge clk); #1;
    chk(segment == SEG_IDLE, "stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
