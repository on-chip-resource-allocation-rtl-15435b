# Hardware buddy allocator for the logic blocks of a reconfigurable device

When several applications share one partially reconfigurable FPGA, something
has to decide, at run time, where each incoming circuit goes. Software placers
are too slow for that. This design makes the decision in combinational logic.
The logic blocks of the device are tracked in an occupancy bit map, with one
bit per block (1 = used, 0 = free). A request for blocks is answered in a
single clock cycle:

- is there room?
- where does the new circuit start?
- which bits must be set?

Freeing blocks uses the same logic and clears the bits instead.

The method is the binary buddy system known from memory allocators. The search
looks for free blocks in aligned powers of two. The marking then marks exactly
the number of blocks requested. Two request shapes share one bit map:

- **array**: a run of `n` consecutive blocks, in row-major order;
- **matrix**: a `w` x `h` rectangle (submesh) of the block array.

## The occupancy map

The top module `resource_allocator` manages `CELLS_X` x `CELLS_Y` blocks
(default 4 x 4). Block (column `x`, row `y`) is bit `y*CELLS_X + x` of the
bit map. In this row-major view, the matrix is just a one-dimensional array of
`N = CELLS_X*CELLS_Y` cells. The array scheme works on that array directly.
Both dimensions must be powers of two.

## Finding free cells: the OR/AND tree (`cell_locator`, `locator_node`)

The cells are the leaves of a complete binary tree. Every node ORs its two
children. The OR output of a node at height `l` is therefore 0 exactly when
the aligned block of `2^l` cells below it is completely free.

To find a block of `2^l` cells, a second chain of signals is ANDed up the same
tree:

- The node at height `l` feeds its own OR output into the AND chain. Its
  `level` input is 1.
- Every node above height `l` passes up the AND of its children's AND
  outputs.

The root's AND output is then the AND of all OR outputs at height `l`. It is 0
if and only if some aligned free block exists, so `valid = ~root_and`.

Finding the *address* of the first free block would normally need a search
with backtracking. This design avoids that. Each node also exports its left
child's AND output as its address bit `p_bit`:

- 0 means the left subtree holds a free block, so go left;
- 1 means go right.

The address is assembled from the top down. A multiplexer per tree level picks
the `p_bit` of the node that the address bits above it point at. Address bits
below the requested level are forced to zero. The result is the absolute
address of the first cell of the block.

One node is three gates and a multiplexer:

```
out_or  = or_a | or_b
out_and = level ? (or_a | or_b) : (and_a & and_b)
p_bit   = and_a
```

Nodes are labelled breadth-first: 0 is the root, and node `j` has children
`2j+1` and `2j+2`. Cell `i` is leaf `N-1+i`.

Worked example (8 cells), taken from the tests:

- Occupancy from address 0 upward: `1 1 0 1 0 0 1 1`. The request is for 2
  cells, level 1.
- The height-1 ORs are `1 1 0 1`. Their AND is 0, so `valid = 1`.
- At the root, the left half's AND is `1 & 1 = 1`, so the msb is 1 (go right).
- In the right half, the left pair's OR is 0, so the next bit is 0.
- The lowest bit is below the requested level, so it is forced to 0.
- The answer is address `100`b = 4.

## Marking: the mark/route tree (`cell_marker`, `mark_node`)

A register-transfer shortcut would shift a run of ones by the start address.
That needs a barrel shifter whose size grows badly with `N`. Instead, a second
tree of the same shape carries two signals from the root to the leaves:

- **mark**: mark this whole subtree. A marked node marks both children.
- **route**: the frontier of the run lies in this subtree.

A routed node at tree level `i` reads size bit `log2(N)-1-i`, which is half of
its subtree, and address bit `log2(N)-1-i`:

| size bit | action |
|---|---|
| 0 | route to the child the address bit names |
| 1 | mark the child the address bit names, route the other |

The root gets `route = en` and `mark = en & size[msb]`. The size input is
`log2(N)+1` bits wide, so `size == N` marks everything.

Walking down the set bits of `size` from the top marks one power-of-two chunk
per set bit, so the run has exactly `size` cells. For example, with 8 cells,
size `0101`b and start 0:

- the root marks cells 0–3 and routes right;
- the next level routes left;
- the last level marks cell 4.

The result is `1 1 1 1 1 0 0 0`.

**Alignment requirement:** the mask is exact when the start is aligned to the
next power of two at or above `size`. Every block the locator returns meets
this, because it searches at level `ceil(log2 size)`. A free must give the
same start and size as the allocation it undoes. Unaligned starts produce
whatever the tree rules give; they are not a supported use.

## Two dimensions (`mesh_locator`, `mesh_marker`)

**Search.** A partial OR tree holds one node type per power-of-two submesh
shape:

- a `(2w, h)` node ORs two side-by-side `(w, h)` nodes;
- a `(w, 2h)` node ORs two stacked `(w, h)` nodes.

On a 4 x 4 mesh this gives every shape from (1,1) to (4,4). For a request, the
OR outputs of the requested shape are laid out row-major over the grid of
submeshes. Positions outside that grid read as used. A level-0
`cell_locator` then finds the first zero. Its index is split into a submesh
column and row, and scaled back to cell coordinates. Submeshes are thus tried
top row first, left to right.

**Marking.** One `cell_marker` along the y axis marks `h` rows starting at row
`y`. Each of its outputs is the `en` (root route) input of that row's x-axis
`cell_marker`, which marks `w` cells from column `x`. The mask is exactly
`w` x `h`.

## The allocator (`resource_allocator`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset, marks every block free |
| `req_valid` | in | a request is present this cycle |
| `req_op` | in | `alloc_pkg::alloc_op_e`: `OP_ALLOC_ARRAY`, `OP_FREE_ARRAY`, `OP_ALLOC_MESH`, `OP_FREE_MESH` |
| `req_size`, `req_addr` | in | array scheme: number of blocks; first block (free only) |
| `req_w`, `req_h`, `req_x`, `req_y` | in | matrix scheme: width, height; corner (free only) |
| `resp_valid` | out | response to the request of the previous cycle |
| `resp_ok` | out | allocation granted (always 1 for a well-formed free) |
| `resp_addr` / `resp_x`, `resp_y` | out | start of the allocated (or freed) region |
| `bitmap` | out | occupancy map, bit `y*CELLS_X+x` |

**Timing.** Requests are sampled on the rising edge. Search and marking are
one combinational pass, and the bit map and the response registers load on
the same edge. The response is therefore valid one cycle after the request,
and a new request can be accepted every cycle. The critical path runs
root-to-leaf through the locator's address multiplexers and then through the
marking tree.

**Sizing an allocation.**

- **Array scheme:** a request of `n` blocks searches for a free aligned block
  of `2^ceil(log2 n)` blocks. It then marks exactly `n`. The rest of that
  block stays free and can be handed out later to requests that fit its
  alignment.
- **Matrix scheme:** each side is rounded up to a power of two for the
  search, and exactly `w` x `h` blocks are marked.

**Refused requests.** A request of size 0, wider or taller than the array, or
larger than `N` is refused (`resp_ok = 0`) and changes nothing.

Two assertions check every granted allocation:

- the marked blocks were all free;
- the number marked equals the number asked for.

## Where this design makes its own choices

The method follows the paper "On-Chip Resource Allocation Algorithm for
Reconfigurable Computing Machines". From it come:

- the OR/AND locator tree and its node function;
- the mark/route marking tree and its node labelling;
- the partial OR tree for submeshes;
- the y-axis marker enabling one x-axis marker per row;
- the two allocation schemes.

The paper also describes a behavioural marker that shifts a run of ones into
place. It rejects that marker as too large, and it is not built here. The
testbenches use its formula as their reference. The following are choices made
for this implementation:

- **Bit map and interface:** the bit map is a register inside the top, with a
  one-request-per-cycle interface and a one-cycle response. The method itself
  is combinational and says nothing about how requests arrive.
- **Shared map:** the array and matrix schemes share one row-major bit map and
  can be mixed freely.
- **Frees are not checked:** the caller must free exactly what it allocated.
  Cells are cleared rather than toggled, so freeing a block that is already
  free leaves it free. Freeing blocks that now belong to another allocation
  does clear them.
- **Absolute addresses:** the locator outputs an absolute address, with its
  low bits forced to zero, rather than a block index to be shifted.
- **2-D address:** the two-dimensional address comes from reusing the 1-D
  locator over a row-major layout of submesh flags.
- **Shared column settings:** all x-axis markers share one start column and
  width.
- **Enable gating:** `en` gates both the root route and the root mark of
  `cell_marker`.

Lint notes:

- The last level of `cell_marker` produces route outputs that nothing reads.
  Verilator reports them as unused.
- The assertions sample `rst_n` synchronously while the flops use it
  asynchronously. Verilator notes that as well.

## Sizes and parameters

| module | parameter | default | notes |
|---|---|---|---|
| `resource_allocator`, `mesh_locator`, `mesh_marker` | `CELLS_X`, `CELLS_Y` | 4, 4 | powers of two |
| `cell_locator`, `cell_marker` | `N` | 8 | power of two, at least 2 |

The one-dimensional trees have been simulated at 8, 16 and 128 cells. The
full allocator has been simulated at 16, 32, 64 and 128 blocks (4x4, 8x4, 8x8,
16x8). Logic grows linearly with `N` for both trees; the 2-D locator holds
`(log2 CELLS_X + 1)(log2 CELLS_Y + 1)` OR levels.

## Files

`rtl/`:

- `alloc_pkg.sv`: the operation enum and `ceil_log2`.
- `locator_node.sv`, `cell_locator.sv`: the 1-D search.
- `mark_node.sv`, `cell_marker.sv`: the 1-D marking.
- `mesh_locator.sv`, `mesh_marker.sv`: the 2-D versions.
- `resource_allocator.sv`: the top.

`tb/`: each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`.

- `tb_locator_node`, `tb_mark_node`: exhaustive truth tables.
- `tb_cell_locator`: every 8-cell map at every level, plus random 16- and
  128-cell maps, against a brute-force first-fit search.
- `tb_cell_marker`: every aligned (start, size) pair on 8 cells, plus random
  ones on 16 and 128, against the shift formula `((1<<size)-1) << start`.
- `tb_mesh_locator`, `tb_mesh_marker`: 4 x 4 and 8 x 4, against brute-force
  searches and rectangles drawn cell by cell.
- `tb_resource_allocator`: end-to-end at the default size against a reference
  model. It checks every response, the one-cycle latency and the whole bit
  map. It counts each mechanism and fails if one never happened:
  - array and matrix grants;
  - refusals for lack of space;
  - refusals of malformed requests;
  - frees of both kinds;
  - exact marking of non-power-of-two requests;
  - whole-array allocation;
  - idle and back-to-back cycles;
  - reset mid-run.
- `tb_alloc_sizes` with helper `alloc_harness`: the allocator at 16, 32, 64
  and 128 blocks.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/alloc_pkg.sv tb/tb_resource_allocator.sv --top-module tb_resource_allocator
./obj_dir/Vtb_resource_allocator
```

Substitute any other testbench name. Each runs in well under a second.
