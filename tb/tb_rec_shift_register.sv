// tb_rec_shift_register: input sampling and window. The testbench makes a
// period strobe every 32 cycles and drives data_in per period with nothing,
// one pulse, a pulse that straddles the period boundary, or several short
// glitches. A period's flag is set if a rising edge of data_in, delayed by
// the synchronizer, falls in it. After every strobe the window must equal
// the testbench's own history of those flags.
module tb_rec_shift_register;
  localparam int P = 32;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       data_in = 1'b0;
  logic       tick = 1'b0;
  logic       pulse;
  logic [7:0] window;
  logic [7:0] expected = '0;
  int checks = 0, failures = 0;

  rec_shift_register dut (.clk(clk), .rst_n(rst_n), .data_in(data_in), .tick(tick),
                          .pulse(pulse), .window(window));

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One period. kind 0: nothing; 1: one pulse starting at cycle 4; 2: three
  // glitches; 3: data_in held high over the whole period (no new edge).
  // The synchronizer delays edges by 2 cycles, so an edge driven at cycle
  // c lands in this period when c + 2 < P.
  task automatic period(int kind);
    bit flag;
    flag = 1'b0;
    for (int c = 0; c < P; c++) begin
      @(negedge clk);
      case (kind)
        1: data_in = (c >= 4 && c < 20);
        2: data_in = (c % 8 == 3);
        3: begin
             if (!data_in && c + 2 < P) flag = 1'b1;
             data_in = 1'b1;
           end
        default: data_in = 1'b0;
      endcase
      tick = (c == P - 1);
    end
    if (kind == 1 || kind == 2) flag = 1'b1;
    @(posedge clk);
    expected = {expected[6:0], flag};
    @(negedge clk);
    tick = 1'b0;
    checks++;
    if (window !== expected) begin
      failures++;
      $display("FAIL: window %b expected %b", window, expected);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 8; i++) period(1);
    for (int i = 0; i < 8; i++) period(0);
    period(2); period(0); period(3); period(3); period(0); period(1);
    for (int i = 0; i < 400; i++) period(int'($urandom_range(0, 2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
