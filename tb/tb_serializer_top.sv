// End-to-end testbench of serializer_top with every parameter at its default
// (eleven data bytes, headers 0x8A/0x8B/0x8C).
//
// It first sends the four records of the worked example: all headers, H_B
// omitted, H_A and H_C omitted, all headers omitted, each with data bytes
// 0x10..0x1A, and checks that each takes exactly (enabled headers + 11)
// cycles.  It then sends a long run of random records with random gaps,
// including gaps of zero (the next run arrives while a record is still being
// sent).  Expected bytes and their cycles come from the record list alone:
// the record starting at cycle s carries its enabled headers (A, B, C order)
// and then its data in cycles s, s+1, ... with no gap; data_out is 0 when
// data_valid is low.  Inputs change just after a rising edge, outputs are
// compared at the falling edge.  A monitor also totals the valid cycles and
// compares them with the sum of the record lengths.
//
// Each mechanism of the design is counted and must occur at least once:
// a disabled header skipped inside a cycle, a fall through from idle
// straight into the data phase, a record started in the same cycle its run
// request is seen, a back-to-back restart, a back-to-back restart with all
// headers disabled (the case that needs the index carried as a variable),
// header enables changing during the data phase, and an asynchronous reset
// in the middle of a record.
module tb_serializer_top;
  import serializer_pkg::*;

  localparam int unsigned N  = DEF_NINPUTS;
  localparam byte_t       HA = DEF_HEADER_A;
  localparam byte_t       HB = DEF_HEADER_B;
  localparam byte_t       HC = DEF_HEADER_C;
  localparam int          R  = 400;     // records

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              run = 1'b0;
  logic              ea = 1'b0, eb = 1'b0, ec = 1'b0;
  logic [N-1:0][7:0] data = '0;
  logic [7:0]        dout;
  logic              dvalid;

  int checks = 0, failures = 0;

  serializer_top dut (
    .clk(clk), .rst_n(rst_n), .run(run),
    .hdr_a_en(ea), .hdr_b_en(eb), .hdr_c_en(ec),
    .data(data), .link_data(dout), .link_valid(dvalid)
  );

  // Mechanism counters.
  int n_hdr_skip = 0, n_idle_to_data = 0, n_idle_to_hdr = 0;
  int n_b2b = 0, n_en_noise = 0, n_mid_reset = 0;
  int valid_cycles = 0, counting = 0;
  always @(negedge clk) if (counting != 0 && dvalid) valid_cycles++;

  always #5 clk = ~clk;

  // Record list and the derived schedule.
  logic [2:0] rec_en   [R];           // {C, B, A}
  byte_t      rec_data [R][N];
  int         rec_start[R];
  int         rec_len  [R];
  int         rec_nh   [R];

  function automatic byte_t expected_byte(int r, int i);
    byte_t hdr[$];
    if (rec_en[r][0]) hdr.push_back(HA);
    if (rec_en[r][1]) hdr.push_back(HB);
    if (rec_en[r][2]) hdr.push_back(HC);
    if (i < hdr.size()) return hdr[i];
    return rec_data[r][i - hdr.size()];
  endfunction

  task automatic check(logic exp_v, byte_t exp_d, int cyc);
    checks++;
    if (dvalid !== exp_v || dout !== exp_d) begin
      failures++;
      if (failures < 20)
        $display("MISMATCH cycle %0d: got valid=%0b data=%02h, expected valid=%0b data=%02h",
                 cyc, dvalid, dout, exp_v, exp_d);
    end
  endtask

  int cur;     // index of the latest record that has started (or -1)
  int b2b_empty = 0;
  int total_len = 0;
  int mech[7];

  initial begin
    int c, s, gap;
    // --- build the record list
    s = 4;
    for (int r = 0; r < R; r++) begin
      // the worked example first: {C,B,A}
      if      (r == 0)     rec_en[r] = 3'b111;
      else if (r == 1)     rec_en[r] = 3'b101;
      else if (r == 2)     rec_en[r] = 3'b010;
      else if (r == 3)     rec_en[r] = 3'b000;
      else if (r % 7 == 0) rec_en[r] = 3'b000;
      else if (r % 7 == 1) rec_en[r] = 3'b111;
      else                 rec_en[r] = 3'($urandom_range(0, 7));
      for (int i = 0; i < N; i++)
        rec_data[r][i] = (r < 4) ? 8'(8'h10 + i) : 8'($urandom);
      rec_nh[r]    = int'(rec_en[r][0]) + int'(rec_en[r][1]) + int'(rec_en[r][2]);
      rec_len[r]   = rec_nh[r] + N;
      rec_start[r] = s;
      gap = (r < 4) ? 3 : (($urandom_range(0, 9) < 4) ? 0 : $urandom_range(1, 3));
      total_len += rec_len[r];
      if (rec_en[r] == 3'b000) n_idle_to_data++;
      else                     n_idle_to_hdr++;
      // a disabled header that is passed over inside a cycle
      if (rec_en[r] != 3'b000)
        for (int h = 0; h < 3; h++) if (!rec_en[r][h]) n_hdr_skip++;
      if (r > 0 && rec_start[r] == rec_start[r-1] + rec_len[r-1]) begin
        n_b2b++;
        if (rec_en[r] == 3'b000) b2b_empty++;
      end
      s = s + rec_len[r] + gap;
    end

    // --- reset: stream must stay silent
    rst_n = 1'b0;
    repeat (2) begin
      @(negedge clk);
      check(1'b0, 8'h00, -1);
    end
    @(posedge clk); #1 rst_n = 1'b1;
    counting = 1;

    // --- cycle-by-cycle run; cycle 0 begins at this edge
    cur = -1;
    c = 0;
    while (1) begin
      if (c > 0) begin
        @(posedge clk); #1;
      end
      if (cur + 1 < R && rec_start[cur+1] == c) cur++;
      // drive inputs of cycle c
      run = (cur + 1 < R && rec_start[cur+1] == c + 1);
      if (cur >= 0) begin
        for (int i = 0; i < N; i++) data[i] = rec_data[cur][i];
        if (c >= rec_start[cur] + rec_nh[cur] + 1) begin
          {ec, eb, ea} = 3'($urandom_range(0, 7));
          if ({ec, eb, ea} != rec_en[cur]) n_en_noise++;
        end
        else
          {ec, eb, ea} = rec_en[cur];
      end
      @(negedge clk);
      if (cur >= 0 && c < rec_start[cur] + rec_len[cur])
        check(1'b1, expected_byte(cur, c - rec_start[cur]), c);
      else
        check(1'b0, 8'h00, c);
      if (cur == R - 1 && c >= rec_start[cur] + rec_len[cur] + 2) break;
      c++;
    end

    counting = 0;
    checks++;
    if (valid_cycles != total_len) begin
      failures++;
      $display("FAIL: %0d valid cycles for %0d bytes of records", valid_cycles, total_len);
    end

    // --- asynchronous reset in the middle of a record
    @(posedge clk); #1;
    {ec, eb, ea} = 3'b101;
    for (int i = 0; i < N; i++) data[i] = 8'(8'h40 + i);
    run = 1'b1;
    @(posedge clk); #1 run = 1'b0;
    @(negedge clk); check(1'b1, HA, -2);
    @(posedge clk); #1;
    @(negedge clk); check(1'b1, HC, -2);
    @(posedge clk); #1;
    @(negedge clk); check(1'b1, 8'h40, -2);
    #1 rst_n = 1'b0;
    n_mid_reset++;
    #1 check(1'b0, 8'h00, -3);
    @(posedge clk); #1 rst_n = 1'b1;
    @(negedge clk); check(1'b0, 8'h00, -3);
    // fresh record, all headers off: must start from data[0]
    {ec, eb, ea} = 3'b000;
    @(posedge clk); #1 run = 1'b1;
    @(posedge clk); #1 run = 1'b0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); check(1'b1, 8'(8'h40 + i), -4);
      @(posedge clk); #1;
    end
    @(negedge clk); check(1'b0, 8'h00, -4);

    mech = '{n_hdr_skip, n_idle_to_data, n_idle_to_hdr, n_b2b, b2b_empty, n_en_noise, n_mid_reset};
    $display("mechanisms: header skipped=%0d idle->data=%0d idle->header=%0d back-to-back=%0d",
             n_hdr_skip, n_idle_to_data, n_idle_to_hdr, n_b2b);
    $display("            back-to-back all-disabled=%0d enable changes in data phase=%0d mid-record reset=%0d",
             b2b_empty, n_en_noise, n_mid_reset);
    $display("            valid cycles=%0d over %0d records", valid_cycles, R);
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL: mechanism %0d never occurred", i);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
