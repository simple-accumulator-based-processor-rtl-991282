// rt_examples_pkg -- port bundles of the register-transfer examples
// (rt_examples) and of the sequencing machines (rt_sequencing) as they
// appear on the system top, at the default 2-bit width. Field meanings are
// given in rt_examples.sv and rt_sequencing.sv.
package rt_examples_pkg;

  localparam int RT_W = 2;

  typedef struct packed {
    logic [RT_W-1:0] xor_a;
    logic [RT_W-1:0] xor_b;
    logic            inc_clr;
    logic            swap_set;
    logic [RT_W-1:0] swap_a_in;
    logic [RT_W-1:0] swap_b_in;
    logic            swap_load;
    logic            ld_c;
    logic [RT_W-1:0] ld_s;
    logic            z_s0;
    logic            z_x;
    logic [RT_W-1:0] z_c;
    logic [RT_W-1:0] z_d;
    logic            mux_s;
    logic [RT_W-1:0] mux_a;
    logic [RT_W-1:0] mux_b;
    logic            and_set;
    logic [RT_W-1:0] and_a_in;
    logic [RT_W-1:0] and_b;
    logic [RT_W-1:0] shl_b;
    logic [RT_W-1:0] f_c;
  } rt_in_t;

  typedef struct packed {
    logic [RT_W-1:0] xor_c;
    logic [RT_W-1:0] inc_a;
    logic [RT_W-1:0] swap_a;
    logic [RT_W-1:0] swap_b;
    logic [RT_W-1:0] ld_d;
    logic [RT_W-1:0] z;
    logic [RT_W-1:0] mux_y;
    logic [RT_W-1:0] and_a;
    logic [RT_W-1:0] shl_a;
    logic            f;
  } rt_out_t;

  typedef struct packed {
    logic            rst;
    logic            go;
    logic [RT_W-1:0] x;
    logic [RT_W-1:0] y;
  } seq_in_t;

  typedef struct packed {
    logic [RT_W-1:0] s3_a;
    logic [RT_W-1:0] s3_b;
    logic [RT_W-1:0] s3_c;
    logic            s3_busy;
    logic [RT_W-1:0] p2_a;
    logic [RT_W-1:0] p2_b;
    logic [RT_W-1:0] p2_c;
    logic            p2_busy;
    logic [RT_W-1:0] g_a;
    logic [RT_W-1:0] g_b;
    logic [RT_W-1:0] g_c;
    logic            g_busy;
  } seq_out_t;

endpackage
