// Self-checking testbench of prbs_ref_channel at its default size (2^23-1,
// span 64, threshold 6, verify 32). The testbench produces the transmitted
// sequence from the recurrence b[k] = b[k-18] ^ b[k-23], flips chosen bits
// and can drop a bit to imitate a clock recovery slip. Scenarios:
//   A  clean start: SYNCED after exactly 23 + 32 bits, then no errors;
//   B  5 scattered errors in 64 bits: each reported on err_o, no resync;
//   C  6 errors in 64 bits with requests disabled: rq_o rises, channel stays
//      SYNCED and keeps reporting exactly the injected errors; enabling
//      requests then starts resynchronization, which completes;
//   D  an error during VERIFY restarts loading;
//   E  a one-bit slip: the reference is out of step, the error window fills,
//      the channel resynchronizes and again reports no errors.
module prbs_ref_channel_tb;
  import prbs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, rx, ren;
  logic ref_bit, err, synced, resyn, rq;
  sync_state_t st;
  logic [6:0] wcnt;
  int checks = 0, failures = 0;
  bit hist[23];
  bit cur;
  int nbits;

  always #5 clk = ~clk;

  prbs_ref_channel dut (
    .clk_i(clk), .rst_ni(rst_n), .bit_en_i(en), .rx_bit_i(rx),
    .resync_en_i(ren), .ref_bit_o(ref_bit), .err_o(err), .synced_o(synced),
    .resyn_o(resyn), .rq_o(rq), .state_o(st), .win_count_o(wcnt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (bit %0d)", what, nbits);
    end
  endtask

  function automatic bit next_tx();
    bit b;
    b = hist[17] ^ hist[22];
    for (int i = 22; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = b;
    return b;
  endfunction

  // Send one bit, flipped if inj. When chk is set and the channel is
  // synchronized in step, err_o must equal inj.
  task automatic send(input bit inj, input bit chk);
    cur = next_tx();
    rx = cur ^ inj;
    en = 1'b1;
    #1;
    if (chk && synced) check(err == inj, "err_o equals injected error");
    @(posedge clk);
    nbits++;
    @(negedge clk);
  endtask

  int t;
  int n_blocked;

  initial begin
    en = 0; rx = 0; ren = 1; nbits = 0;
    foreach (hist[i]) hist[i] = 1'b1;
    // advance the transmitter so the receiver does not start in step
    repeat (1000) void'(next_tx());
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // A
    t = 0;
    while (!synced && t < 500) begin send(0, 0); t++; end
    check(t == 23 + 32, $sformatf("clean synchronization took %0d bits", t));
    repeat (300) send(0, 1);
    check(synced && wcnt == 0, "A: synchronized, window empty");
    // B
    for (int i = 0; i < 64; i++) send(i % 13 == 5, 1);
    check(synced && !rq && wcnt == 5, $sformatf("B: still synchronized, window %0d", wcnt));
    repeat (100) send(0, 1);
    check(wcnt == 0, "B: window drained");
    // C
    ren = 0; n_blocked = 0;
    for (int i = 0; i < 64; i++) begin
      send(i % 10 == 0, 1);
      if (rq) n_blocked++;
    end
    check(synced && n_blocked > 0, $sformatf("C: request held off for %0d bits", n_blocked));
    ren = 1;
    #1;
    check(rq, "C: request pending when enabled");
    @(posedge clk); @(negedge clk);
    check(st == ST_RESYNC && resyn, "C: accepted request enters RESYNC");
    t = 0;
    while (!synced && t < 500) begin send(0, 0); t++; end
    check(t == 55, $sformatf("C: resynchronization took %0d bits", t));
    repeat (100) send(0, 1);
    // D: force a resync by a slip, then an error during VERIFY
    void'(next_tx());
    t = 0;
    while (synced && t < 500) begin send(0, 0); t++; end
    check(!synced && t < 64, $sformatf("E: slip detected after %0d bits", t));
    while (st != ST_VERIFY) send(0, 0);
    repeat (10) send(0, 0);
    send(1, 0);
    check(st == ST_RESYNC, "D: error in VERIFY restarts loading");
    t = 0;
    while (!synced && t < 500) begin send(0, 0); t++; end
    check(t == 55, $sformatf("D/E: recovery took %0d bits", t));
    repeat (500) send(0, 1);
    check(synced && wcnt == 0, "E: back in step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
