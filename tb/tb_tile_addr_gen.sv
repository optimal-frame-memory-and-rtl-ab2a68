// tb_tile_addr_gen: drives the three-lane address generator of a full-size
// buffer (4080 tiles, 4 banks) with random lane enables, tiles and rows and
// checks, against a model, that bank t mod 4 receives address
// (t div 4) * 16 + row for every enabled lane, that no other bank is enabled,
// that lane_bank names the bank, and that two lanes on one bank raise
// conflict (the lower lane keeping the port). Consecutive tiles, as the
// buffer hands them to neighbouring BABs, must never conflict.
module tb_tile_addr_gen;
  logic        lane_en   [3];
  logic [11:0] lane_tile [3];
  logic [3:0]  row;
  logic        bank_en   [4];
  logic [13:0] bank_addr [4];
  logic [1:0]  lane_bank [3];
  logic        conflict;
  int checks = 0, failures = 0;

  tile_addr_gen dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input bit consecutive);
    bit   e_en [4];
    int   e_addr [4];
    bit   e_conf, bad;
    e_conf = 0;
    for (int b = 0; b < 4; b++) begin e_en[b] = 0; e_addr[b] = 0; end
    for (int l = 2; l >= 0; l--) begin
      if (lane_en[l]) begin
        int b;
        b = int'(lane_tile[l]) % 4;
        if (e_en[b]) e_conf = 1;
        e_en[b] = 1;
        e_addr[b] = (int'(lane_tile[l]) / 4) * 16 + int'(row);
      end
    end
    #1;
    checks++;
    bad = 0;
    for (int l = 0; l < 3; l++)
      if (int'(lane_bank[l]) != int'(lane_tile[l]) % 4) bad = 1;
    for (int b = 0; b < 4; b++)
      if (bank_en[b] != e_en[b] || (e_en[b] && int'(bank_addr[b]) != e_addr[b])) begin
        bad = 1;
        $display("FAIL bank %0d: en %0d/%0d addr %0d/%0d", b, bank_en[b], e_en[b], bank_addr[b], e_addr[b]);
      end
    if (conflict != e_conf || (consecutive && conflict)) begin
      bad = 1; $display("FAIL conflict %0d/%0d", conflict, e_conf);
    end
    if (bad) failures++;
  endtask

  initial begin
    // every tile and row on lane 0 alone
    for (int t = 0; t < 4080; t++) begin
      lane_en[0] = 1; lane_en[1] = 0; lane_en[2] = 0;
      lane_tile[0] = 12'(t); lane_tile[1] = '0; lane_tile[2] = '0;
      row = 4'(t % 16);
      check_one(0);
    end
    // random lanes
    for (int i = 0; i < 20000; i++) begin
      for (int l = 0; l < 3; l++) begin
        lane_en[l] = 1'($urandom_range(0, 1));
        lane_tile[l] = 12'($urandom_range(0, 4079));
      end
      row = 4'($urandom);
      check_one(0);
    end
    // consecutive tiles, any lanes enabled
    for (int i = 0; i < 5000; i++) begin
      int t;
      t = $urandom_range(0, 4077);
      for (int l = 0; l < 3; l++) begin
        lane_en[l] = 1'($urandom_range(0, 1));
        lane_tile[l] = 12'(t + l);
      end
      row = 4'($urandom);
      check_one(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
