// Self-checking testbench of ft_serializer at a reduced record length
// (NINPUTS = 5) and non-default header values.
//
// A list of records is generated up front: random header enables (with the
// all-disabled and all-enabled cases forced in), random data and a random gap
// of 0..3 idle cycles to the next record, a gap of 0 meaning that the next
// run request arrives while the current record is still being sent.  From
// that list alone the testbench works out, cycle by cycle, what run, the
// enables and the data must be, and which byte the stream must carry: the
// record starting at cycle s carries its enabled headers in the order A, B,
// C and then its data bytes in cycles s, s+1, ... with no gap, and data_out
// is 0 whenever data_valid is low.  Inputs change just after a rising edge;
// outputs are compared at the falling edge.  After the first data byte of a
// record the header enables are toggled at random to show they are ignored.
// A final phase resets the device in the middle of a record and checks that
// the stream stops at once and that a new record then starts cleanly.
module tb_ft_serializer;
  import serializer_pkg::*;

  localparam int unsigned N  = 5;
  localparam byte_t       HA = 8'hA5;
  localparam byte_t       HB = 8'h3C;
  localparam byte_t       HC = 8'hF0;
  localparam int          R  = 300;     // records

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              run = 1'b0;
  logic              ea = 1'b0, eb = 1'b0, ec = 1'b0;
  logic [N-1:0][7:0] data = '0;
  logic [7:0]        dout;
  logic              dvalid;

  int checks = 0, failures = 0;

  ft_serializer #(.NINPUTS(N), .HEADER_A(HA), .HEADER_B(HB), .HEADER_C(HC)) dut (
    .clk(clk), .rst_n(rst_n), .run(run),
    .hdr_a_en(ea), .hdr_b_en(eb), .hdr_c_en(ec),
    .data(data), .data_out(dout), .data_valid(dvalid)
  );

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

  initial begin
    int c, s, gap;
    // --- build the record list
    s = 4;
    for (int r = 0; r < R; r++) begin
      if      (r % 7 == 0) rec_en[r] = 3'b000;
      else if (r % 7 == 1) rec_en[r] = 3'b111;
      else                 rec_en[r] = 3'($urandom_range(0, 7));
      for (int i = 0; i < N; i++) rec_data[r][i] = 8'($urandom);
      rec_nh[r]    = int'(rec_en[r][0]) + int'(rec_en[r][1]) + int'(rec_en[r][2]);
      rec_len[r]   = rec_nh[r] + N;
      rec_start[r] = s;
      gap = ($urandom_range(0, 9) < 4) ? 0 : $urandom_range(1, 3);
      if (r > 0 && rec_start[r] == rec_start[r-1] + rec_len[r-1] && rec_en[r] == 3'b000)
        b2b_empty++;
      s = s + rec_len[r] + gap;
    end

    // --- reset: stream must stay silent
    rst_n = 1'b0;
    repeat (2) begin
      @(negedge clk);
      check(1'b0, 8'h00, -1);
    end
    @(posedge clk); #1 rst_n = 1'b1;

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
        if (c >= rec_start[cur] + rec_nh[cur] + 1)
          {ec, eb, ea} = 3'($urandom_range(0, 7));
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

    if (b2b_empty == 0) begin
      failures++;
      $display("FAIL: no back-to-back record with all headers disabled was generated");
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

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
