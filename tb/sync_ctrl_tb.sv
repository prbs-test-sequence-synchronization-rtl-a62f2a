// Self-checking testbench of sync_ctrl at the default sizes (load 23 bits,
// verify 32 bits). Random bit enables, error flags, window-threshold flags
// and request enables drive the controller; a reference model in the
// testbench counts loaded and verified bits and predicts the state and all
// outputs after every edge. Phases with few and with many errors make every
// transition happen; each is counted and must occur. A directed pass then
// measures the minimum time from reset to SYNCED: 23 + 32 = 55 bits.
module sync_ctrl_tb;
  import prbs_pkg::*;
  localparam int LOAD = 23, VER = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, err, over, ren;
  sync_state_t st;
  logic load, synced, rq, wclr, wen;
  sync_state_t m_st;
  int m_cnt;
  int checks = 0, failures = 0;
  int n_ld2ver = 0, n_ver2rs = 0, n_ver2sy = 0, n_sy2rs = 0, n_blocked = 0;

  always #5 clk = ~clk;

  sync_ctrl #(.LOAD_LEN(LOAD), .VERIFY_LEN(VER)) dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .err_i(err), .over_i(over),
    .resync_en_i(ren), .state_o(st), .load_o(load), .synced_o(synced),
    .rq_o(rq), .win_clr_o(wclr), .win_en_o(wen));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic model_step();
    case (m_st)
      ST_RESYNC: if (en) begin
        m_cnt++;
        if (m_cnt == LOAD) begin m_st = ST_VERIFY; m_cnt = 0; n_ld2ver++; end
      end
      ST_VERIFY: if (en) begin
        if (err) begin m_st = ST_RESYNC; m_cnt = 0; n_ver2rs++; end
        else begin
          m_cnt++;
          if (m_cnt == VER) begin m_st = ST_SYNCED; m_cnt = 0; n_ver2sy++; end
        end
      end
      default: begin
        if (over && !ren) n_blocked++;
        if (over && ren) begin m_st = ST_RESYNC; m_cnt = 0; n_sy2rs++; end
      end
    endcase
  endtask

  int t;

  initial begin
    en = 0; err = 0; over = 0; ren = 0;
    m_st = ST_RESYNC; m_cnt = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 40000; k++) begin
      en   = $urandom_range(0, 4) != 0;
      err  = $urandom_range(0, 999) < (((k / 2000) % 2 == 1) ? 60 : 4);
      over = $urandom_range(0, 99) < 3;
      ren  = $urandom_range(0, 1) == 1;
      #1;
      check(rq == (m_st == ST_SYNCED && over) && wen == (m_st == ST_SYNCED && en),
            $sformatf("k=%0d combinational outputs", k));
      @(posedge clk);
      model_step();
      @(negedge clk);
      check(st == m_st && load == (m_st == ST_RESYNC) && synced == (m_st == ST_SYNCED) &&
            wclr == (m_st != ST_SYNCED), $sformatf("k=%0d state %s exp %s", k, st.name(), m_st.name()));
    end
    check(n_ld2ver > 0 && n_ver2rs > 0 && n_ver2sy > 0 && n_sy2rs > 0 && n_blocked > 0,
          $sformatf("transitions load->verify %0d verify->resync %0d verify->synced %0d synced->resync %0d blocked %0d",
                    n_ld2ver, n_ver2rs, n_ver2sy, n_sy2rs, n_blocked));
    // directed: reset to SYNCED in exactly LOAD + VER error-free bits
    rst_n = 0; en = 1; err = 0; over = 0; ren = 1;
    @(negedge clk);
    rst_n = 1;
    t = 0;
    while (!synced && t < 200) begin
      @(posedge clk); t++;
      @(negedge clk);
    end
    check(t == LOAD + VER, $sformatf("bits from reset to SYNCED %0d, expected %0d", t, LOAD + VER));
    $display("transitions: load->verify %0d verify->resync %0d verify->synced %0d synced->resync %0d blocked-request cycles %0d",
             n_ld2ver, n_ver2rs, n_ver2sy, n_sy2rs, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
