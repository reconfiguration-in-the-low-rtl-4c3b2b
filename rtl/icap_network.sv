// icap_network: the 64-input, 64-output bit-serial connection network of
// the ICAP prototype, a full crossbar with broadcast built from two columns
// of four 32 x 32 PARCOS chips.
//
// Column 1: chips 0 and 1 both receive network inputs 0-31, chips 2 and 3
// both receive inputs 32-63.  Column 2: chip k (k = 0..3) drives network
// outputs 16k .. 16k+15 from its outputs 0-15.  Its inputs 0-15 come from
// outputs 16(k mod 2) .. 16(k mod 2)+15 of column-1 chip k/2 (the half with
// inputs 0-31), its inputs 16-31 from the same outputs of column-1 chip
// 2 + k/2 (the half with inputs 32-63).  Each network output thus owns one
// private path through each half, so any mapping of inputs onto outputs,
// broadcasts included, can be set up without blocking.  Which column-1
// chips feed which column-2 chips follows the network drawing; the exact
// pin numbering inside that grouping is this design's reading of it.
//
// Configuration is one command per cycle from the array controller:
//   NET_SET_ROW  row    : select control word `row` in all eight chips
//   NET_LINK     out,in : in that control word, connect network output
//                         `out` to network input `in` (writes one byte in a
//                         column-1 chip and one in a column-2 chip at once)
//   NET_RESWITCH row    : make control word `row` live in all chips
// So a complete 64-link pattern takes 64 NET_LINK commands and switching to
// a stored pattern takes one command.  Commands take effect at the clock
// edge; the data path sin -> sout is combinational.
module icap_network
  import iua_pkg::*;
#(
  localparam int unsigned PORTS = 2 * PARCOS_N,
  localparam int unsigned H     = PARCOS_N / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  net_cmd_e                cmd,
  input  logic [5:0]              cmd_out,
  input  logic [5:0]              cmd_in,
  input  logic [4:0]              cmd_row,
  input  logic [PORTS-1:0]        sin,
  output logic [PORTS-1:0]        sout
);

  logic [5:0]          c_addr [8];
  logic [4:0]          c_data [8];
  logic                c_wr1  [8];
  logic                c_wr2  [8];
  logic [PARCOS_N-1:0] c1_in  [4];
  logic [PARCOS_N-1:0] c1_out [4];
  logic [PARCOS_N-1:0] c2_in  [4];
  logic [PARCOS_N-1:0] c2_out [4];

  // configuration decode
  always_comb begin
    logic [1:0] k;
    logic [3:0] lo;
    logic       upper;
    k     = cmd_out[5:4];
    lo    = cmd_out[3:0];
    upper = !cmd_in[5];
    for (int i = 0; i < 8; i++) begin
      c_addr[i] = '0;
      c_data[i] = '0;
      c_wr1[i]  = 1'b0;
      c_wr2[i]  = 1'b0;
    end
    unique case (cmd)
      NET_SET_ROW:
        for (int i = 0; i < 8; i++) begin
          c_wr1[i]  = 1'b1;
          c_addr[i] = 6'd32;
          c_data[i] = cmd_row;
        end
      NET_RESWITCH:
        for (int i = 0; i < 8; i++) begin
          c_wr2[i]  = 1'b1;
          c_data[i] = cmd_row;
        end
      NET_LINK: begin
        // column-1 chip (indices 0..3)
        for (int i = 0; i < 4; i++)
          if (i == (upper ? int'(k[1]) : 2 + int'(k[1]))) begin
            c_wr1[i]  = 1'b1;
            c_addr[i] = {1'b0, k[0], lo};
            c_data[i] = cmd_in[4:0];
          end
        // column-2 chip (indices 4..7)
        for (int i = 0; i < 4; i++)
          if (i == int'(k)) begin
            c_wr1[4+i]  = 1'b1;
            c_addr[4+i] = {2'b00, lo};
            c_data[4+i] = {!upper, lo};
          end
      end
      default: ;
    endcase
  end

  // data path
  always_comb begin
    c1_in[0] = sin[PARCOS_N-1:0];
    c1_in[1] = sin[PARCOS_N-1:0];
    c1_in[2] = sin[PORTS-1:PARCOS_N];
    c1_in[3] = sin[PORTS-1:PARCOS_N];
    for (int k = 0; k < 4; k++) begin
      c2_in[k][H-1:0]        = c1_out[k/2][(k%2)*H +: H];
      c2_in[k][PARCOS_N-1:H] = c1_out[2 + k/2][(k%2)*H +: H];
      sout[k*H +: H]         = c2_out[k][H-1:0];
    end
  end

  // The read port of the chips is not used by the network: the array
  // controller keeps its own copy of every pattern it stores.
  for (genvar i = 0; i < 4; i++) begin : g_col1
    parcos u_parcos (
      .clk     (clk),
      .rst_n   (rst_n),
      .addr    (c_addr[i]),
      .data_in (c_data[i]),
      .wr1     (c_wr1[i]),
      .wr2     (c_wr2[i]),
      .rd      (1'b0),
      .pr      (1'b0),
      .data_out(),
      .sin     (c1_in[i]),
      .sout    (c1_out[i])
    );
  end

  for (genvar i = 0; i < 4; i++) begin : g_col2
    parcos u_parcos (
      .clk     (clk),
      .rst_n   (rst_n),
      .addr    (c_addr[4+i]),
      .data_in (c_data[4+i]),
      .wr1     (c_wr1[4+i]),
      .wr2     (c_wr2[4+i]),
      .rd      (1'b0),
      .pr      (1'b0),
      .data_out(),
      .sin     (c2_in[i]),
      .sout    (c2_out[i])
    );
  end

endmodule
