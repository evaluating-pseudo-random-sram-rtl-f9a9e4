// Testbench of the zone mapper. Sweeps every location of four instances:
// the default L2 bank (768 lines, 24 ways, set-defined zones -> 32 zones)
// and the 1024-line, 256-way, 4-set L1 configuration with set-defined
// (4 zones), contiguous (32 zones of 32 lines) and non-contiguous (32 zones
// striped over a stride of 32) zoning. Expected zones are computed here with
// plain arithmetic on the location.
module tb_zone_map;
  import hybrid_sram_pkg::*;

  logic [9:0] a_l2, a_l1;
  logic [4:0] z_l2, z_cont, z_str;
  logic [1:0] z_set1;
  int checks = 0, failures = 0;

  zone_map u_l2 (.addr(a_l2), .zone(z_l2));
  zone_map #(.WORDS(1024), .WAYS(256), .ZONES(4),  .ZONING(ZONE_SET_DEFINED))
    u_l1_set (.addr(a_l1), .zone(z_set1));
  zone_map #(.WORDS(1024), .WAYS(256), .ZONES(32), .ZONING(ZONE_CONTIGUOUS))
    u_l1_cont (.addr(a_l1), .zone(z_cont));
  zone_map #(.WORDS(1024), .WAYS(256), .ZONES(32), .ZONING(ZONE_STRIDED))
    u_l1_str (.addr(a_l1), .zone(z_str));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int a = 0; a < 768; a++) begin
      int exp_set;
      a_l2 = 10'(a); #1;
      exp_set = 0;
      while ((exp_set + 1) * 24 <= a) exp_set++;     // set of location a
      chk(int'(z_l2) == exp_set, $sformatf("L2 set-defined zone of %0d = %0d", a, z_l2));
    end
    for (int a = 0; a < 1024; a++) begin
      a_l1 = 10'(a); #1;
      chk(z_set1 == a[9:8], $sformatf("L1 set-defined zone of %0d", a));
      chk(z_cont == a[9:5], $sformatf("L1 contiguous zone of %0d", a));
      chk(z_str  == a[4:0], $sformatf("L1 non-contiguous zone of %0d", a));
    end
    // spot values
    a_l2 = 10'd767; #1; chk(z_l2 == 5'd31, "last L2 line in zone 31");
    a_l2 = 10'd23;  #1; chk(z_l2 == 5'd0,  "line 23 in zone 0");
    a_l2 = 10'd24;  #1; chk(z_l2 == 5'd1,  "line 24 in zone 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
