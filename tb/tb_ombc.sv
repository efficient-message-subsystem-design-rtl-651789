// tb_ombc: random test of the outstanding message buffer counter against a
// saturating integer model. Uses a 4-bit counter so that both saturation
// limits are reached. Checks count, zero and the one-cycle zero_event.
module tb_ombc;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic set_en = 0, sw_inc = 0, sw_dec = 0, hw_dec = 0;
  logic [W-1:0] set_val = '0;
  logic [W-1:0] count;
  logic zero, zero_event;
  int checks = 0, failures = 0;
  int model, prev, n_events = 0, n_sat_lo = 0, n_sat_hi = 0;

  ombc #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: count=%0d model=%0d", what, count, model);
    end
  endtask

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0 && zero, "reset value");
    for (int i = 0; i < 3000; i++) begin
      set_en  = ($urandom_range(0, 30) == 0);
      set_val = W'($urandom);
      sw_inc  = ($urandom_range(0, 2) == 0);
      sw_dec  = ($urandom_range(0, 5) == 0);
      hw_dec  = ($urandom_range(0, 2) == 0);
      prev = model;
      if (set_en) model = int'(set_val);
      else begin
        model = model + int'(sw_inc) - int'(sw_dec) - int'(hw_dec);
        if (model < 0) begin model = 0; n_sat_lo++; end
        if (model > (1 << W) - 1) begin model = (1 << W) - 1; n_sat_hi++; end
      end
      @(negedge clk);
      check(int'(count) == model, "count");
      check(zero == (model == 0), "zero flag");
      check(zero_event == (model == 0 && prev != 0), "zero event");
      if (zero_event) n_events++;
    end
    check(n_events > 0 && n_sat_lo > 0 && n_sat_hi > 0, "coverage");
    $display("zero events %0d, saturations low %0d high %0d", n_events, n_sat_lo, n_sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
