// tb_lfsr: checks the LFSR against an independent bit-level model.
// A 16-bit instance (taps 16, 15, 13, 4, one step per clock) must run through
// all 2^16 - 1 non-zero states and return to its seed exactly then; the
// default 32-bit instance (32 steps per clock) is compared every cycle with
// a model that recomputes the feedback from the tap positions 32, 22, 2, 1.
module tb_lfsr;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [15:0] r16;
  logic [31:0] r32;

  lfsr #(.WIDTH(16), .TAPS(16'hD008), .STEPS(1)) u16 (
    .clk(clk), .rst(rst), .en(en), .seed(16'hACE1), .rnd(r16));
  lfsr u32 (.clk(clk), .rst(rst), .en(en), .seed(32'h1), .rnd(r32));

  logic [31:0] model32;
  logic [15:0] model16;
  int          period;
  logic        seen_seed;

  function automatic logic [31:0] step32(logic [31:0] s);
    for (int k = 0; k < 32; k++) s = {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
    return s;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    checks++; if (r16 !== 16'hACE1 || r32 !== 32'h1) begin
      failures++; $display("FAIL seed r16=%h r32=%h", r16, r32);
    end
    model32 = 32'h1;
    model16 = 16'hACE1;
    en <= 1'b1;
    period = 0;
    seen_seed = 1'b0;
    while (!seen_seed && period < 70000) begin
      @(posedge clk); #1;
      period++;
      model32 = step32(model32);
      model16 = {model16[14:0], model16[15] ^ model16[14] ^ model16[12] ^ model16[3]};
      if (period < 3000) begin
        checks++;
        if (r32 !== model32 || r16 !== model16) begin
          failures++;
          if (failures < 5) $display("FAIL step %0d r32=%h exp %h r16=%h exp %h",
                                     period, r32, model32, r16, model16);
        end
      end
      if (r16 == 16'h0) begin
        failures++; $display("FAIL all-zero state reached");
      end
      if (r16 == 16'hACE1) seen_seed = 1'b1;
    end
    checks++;
    if (period != 65535) begin
      failures++; $display("FAIL period %0d, expected 65535", period);
    end
    // en low holds the state
    en <= 1'b0;
    @(posedge clk); #1 model32 = r32;
    repeat (3) @(posedge clk);
    #1 checks++; if (r32 !== model32) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
