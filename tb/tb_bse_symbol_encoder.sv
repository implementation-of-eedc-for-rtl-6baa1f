// tb_bse_symbol_encoder: checks the symbol encoder's output patterns.
// Requests a CAS/MTS and a WUS, holds each back for a while with its 'ok'
// input low, and records TX/TX_EN sample by sample. The record is compared
// with the expected run lengths: CAS/MTS = 30 low bits driven; WUS = two
// repetitions of 60 low bits driven and 180 bits released. Also checks that
// nothing is sent while 'ok' is low, that the symbol starts one clock after
// 'ok', and that 'done' pulses once per symbol.
module tb_bse_symbol_encoder;
  localparam int SPB = 4;
  logic clk = 0, rst_n = 0;
  logic req_cas_mts = 0, req_wus = 0, ok_cas_mts = 0, ok_wus = 0;
  logic tx, tx_en, busy, done;
  int checks = 0, failures = 0, n_done = 0;

  bse_symbol_encoder #(.SAMPLES_PER_BIT(SPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Record {tx_en, tx} each clock from the clock after 'ok' until busy falls.
  task automatic capture(output logic [1:0] rec[$], output int lead);
    rec = {};
    lead = 0;
    @(posedge clk); #1;
    while (!busy) begin lead++; @(posedge clk); #1; end
    while (busy) begin rec.push_back({tx_en, tx}); @(posedge clk); #1; end
  endtask

  // Compare a recording with runs of (value, bits).
  task automatic compare(logic [1:0] rec[$], logic [1:0] val[$], int nbits[$], string what);
    int k;
    bit ok;
    k = 0; ok = 1;
    foreach (val[i]) for (int s = 0; s < nbits[i] * SPB; s++) begin
      if (k >= rec.size() || rec[k] != val[i]) ok = 0;
      k++;
    end
    if (k != rec.size()) ok = 0;
    chk(ok, what);
    if (!ok) $display("  recorded %0d samples, expected %0d", rec.size(), k);
  endtask

  initial begin
    logic [1:0] rec[$];
    int lead, d0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(tx && !tx_en && !busy, "idle output");
    // CAS/MTS held back, then allowed
    req_cas_mts = 1; @(negedge clk); req_cas_mts = 0;
    repeat (20) @(negedge clk);
    chk(!busy && !tx_en, "nothing sent while not allowed");
    d0 = n_done;
    ok_cas_mts = 1;
    capture(rec, lead);
    ok_cas_mts = 0;
    chk(lead == 0, "CAS starts one clock after ok");
    compare(rec, '{2'b10}, '{30}, "CAS/MTS pattern");
    repeat (2) @(negedge clk);
    chk(n_done == d0 + 1, "one done for CAS");
    chk(tx && !tx_en, "released after CAS");
    // WUS
    req_wus = 1; @(negedge clk); req_wus = 0;
    repeat (7) @(negedge clk);
    chk(!busy, "WUS waits for ok");
    d0 = n_done;
    ok_wus = 1;
    capture(rec, lead);
    ok_wus = 0;
    compare(rec, '{2'b10, 2'b01, 2'b10, 2'b01}, '{60, 180, 60, 180}, "WUS pattern");
    repeat (2) @(negedge clk);
    chk(n_done == d0 + 1, "one done for WUS");
    // both pending: CAS/MTS first when both are allowed
    req_wus = 1; req_cas_mts = 1; @(negedge clk); req_wus = 0; req_cas_mts = 0;
    ok_cas_mts = 1; ok_wus = 1;
    capture(rec, lead);
    ok_cas_mts = 0;
    compare(rec, '{2'b10}, '{30}, "CAS/MTS first");
    capture(rec, lead);
    ok_wus = 0;
    compare(rec, '{2'b10, 2'b01, 2'b10, 2'b01}, '{60, 180, 60, 180}, "then WUS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
