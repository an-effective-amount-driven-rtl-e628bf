// tb_adem_bus_top_full: the bus at its default size (M = 32, 4 informed
// lines) with no parameter overrides. Sends 2000 words (random, sparse and
// constant) and checks that each is delivered unchanged exactly two clocks
// later and that the encoded lines actually change state.
module tb_adem_bus_top_full;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [31:0] in_data = '0;
  logic        out_valid, bus_valid;
  logic [31:0] out_data, bus_data;
  logic [3:0]  bus_info;
  logic [31:0] exp_q[$];
  int          cyc_q[$];
  int          cycle = 0, bus_changes = 0;
  logic [31:0] last_bus = '0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  adem_bus_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data),
    .bus_valid(bus_valid), .bus_data(bus_data), .bus_info(bus_info)
  );

  always @(posedge clk) begin
    logic v;
    logic [31:0] d;
    int c;
    v = in_valid && rst_n;
    d = in_data;
    c = cycle;
    #1;
    if (rst_n) begin
      if (out_valid) begin
        logic [31:0] e;
        int ec;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output %h", out_data);
        end else begin
          e = exp_q.pop_front();
          ec = cyc_q.pop_front();
          if (e != out_data || cycle - ec != 2) begin
            failures++;
            $display("FAIL out %h exp %h latency %0d", out_data, e, cycle - ec);
          end
        end
      end
      if (bus_data != last_bus) bus_changes++;
      last_bus = bus_data;
      if (v) begin
        exp_q.push_back(d);
        cyc_q.push_back(c);
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      case (k % 4)
        0: in_data = $urandom();
        1: in_data = $urandom() & $urandom() & $urandom();
        2: in_data = ~($urandom() & $urandom());
        default: in_data = {16{k[3], k[5]}};
      endcase
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words undelivered", exp_q.size()); end
    checks++;
    if (bus_changes == 0) begin failures++; $display("FAIL bus never changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
