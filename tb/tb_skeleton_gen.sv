// tb_skeleton_gen: checks that joints are paired into bones by colour.
//
// The four joints are given random coordinates and a random permutation of
// the four colours (sometimes with a colour missing). Bone 0 must be
// red then green, bone 1 yellow then blue, one clock later, and 'found'
// must say which pairs were complete.
module tb_skeleton_gen;
  import mocap_pkg::*;
  logic clk = 0, rst = 1;
  xyz_t  joint [4];
  bone_t bone [2];
  logic [1:0] found;
  int checks = 0, failures = 0, n_missing = 0;

  skeleton_gen dut (.clk, .rst, .joint, .bone, .found);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 4; j++) joint[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 1000; i++) begin
      int perm [4];
      int where [4];
      logic [1:0] ef;
      perm = '{0, 1, 2, 3};
      for (int k = 3; k > 0; k--) begin
        int r, t;
        r = $urandom_range(k);
        t = perm[k]; perm[k] = perm[r]; perm[r] = t;
      end
      if ($urandom_range(4) == 0) begin   // one colour missing: duplicate another
        int k;
        k = $urandom_range(3);
        perm[k] = perm[(k + 1) % 4];
        n_missing++;
      end
      for (int c = 0; c < 4; c++) where[c] = -1;
      @(negedge clk);
      for (int j = 0; j < 4; j++) begin
        joint[j].x = 11'($urandom);
        joint[j].y = 11'($urandom);
        joint[j].z = 10'($urandom);
        joint[j].color = 2'(perm[j]);
        if (where[perm[j]] < 0) where[perm[j]] = j;
      end
      ef[0] = where[0] >= 0 && where[2] >= 0;
      ef[1] = where[1] >= 0 && where[3] >= 0;
      @(posedge clk); #1;
      checks++;
      if (found !== ef) failures++;
      if (ef[0]) begin
        checks++;
        if (bone[0].a !== joint[where[0]] || bone[0].b !== joint[where[2]]) failures++;
      end
      if (ef[1]) begin
        checks++;
        if (bone[1].a !== joint[where[1]] || bone[1].b !== joint[where[3]]) failures++;
      end
    end
    checks++;
    if (n_missing == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
